// noc_coding_top -- coded inter-switch link fabric, one link per coding scheme.
//
// A network-on-chip moves 32-bit flits between switches over long, densely
// packed wires where crosstalk and other transient noise flip bits. This top
// places one pipelined switch-to-switch link for each coding scheme side by
// side (index = noc_code_pkg::scheme_e):
//   0 CADEC  Hamming(38,32) + duplication + parity, corrects two errors, ARQ
//            beyond that (the proposed scheme)
//   1 ED     Hamming(38,32) detection, ARQ on any error
//   2 DAP, 3 BSC, 4 MDR   joint crosstalk avoidance + single error correction
//   5 FOC, 6 FTC, 7 FPC   crosstalk avoidance only
// Each link has its own flit handshake, error-injection mask and outputs; the
// switches on either side are outside this design. Arrays are 77 wires wide
// (the widest code, CADEC); a link uses the low coded_width(scheme) bits of
// err/link and ignores the rest. Latency through every link is two cycles.
// Beside the links sits a source-to-destination path with PATH_HOPS
// intermediate switches that uses header-only coding (hdr_coded_path, FPC
// code): only header flits are decoded and re-encoded at each hop, payload
// flits stay coded from source to destination. Its latency is PATH_HOPS + 2.
// Flits on it carry a 4-bit packet id in bits 3:0 and headers a 5-bit flit
// count in bits 8:4; hp_pid_mismatch flags, per hop, a payload flit whose
// coded id does not match its header's.
// The codes, the flit-level switch-to-switch retransmission and the
// header-only coding follow the document; placing every scheme side by side
// on one top, the error-injection ports, the two-cycle link pipeline and the
// two-flit replay buffer are this design's own.
module noc_coding_top
  import noc_code_pkg::*;
(
  input  logic                                   clk,
  input  logic                                   rst_n,
  input  logic [NUM_SCHEMES-1:0]                 in_valid,
  input  logic [NUM_SCHEMES-1:0][FLIT_W-1:0]     in_data,
  output logic [NUM_SCHEMES-1:0]                 in_ready,
  input  logic [NUM_SCHEMES-1:0][MAX_CODED_W-1:0] err,
  output logic [NUM_SCHEMES-1:0][MAX_CODED_W-1:0] link,
  output logic [NUM_SCHEMES-1:0]                 out_valid,
  output logic [NUM_SCHEMES-1:0][FLIT_W-1:0]     out_data,
  output logic [NUM_SCHEMES-1:0]                 arq,
  output logic [NUM_SCHEMES-1:0]                 corr,
  output logic [NUM_SCHEMES-1:0]                 replay,
  // header-only coded multi-hop path
  input  logic                                   hp_in_valid,
  input  logic [FLIT_W-1:0]                      hp_in_data,
  output logic                                   hp_out_valid,
  output logic [FLIT_W-1:0]                      hp_out_data,
  output logic [PATH_HOPS-1:0]                   hp_hdr_valid,
  output logic [PATH_HOPS-1:0][FLIT_W-1:0]       hp_hdr_data,
  output logic [PATH_HOPS-1:0]                   hp_codec_used,
  output logic [PATH_HOPS-1:0]                   hp_pid_mismatch
);
  hdr_coded_path #(.SCHEME(SCH_FPC), .HOPS(PATH_HOPS)) u_path (
    .clk, .rst_n,
    .in_valid(hp_in_valid), .in_data(hp_in_data),
    .out_valid(hp_out_valid), .out_data(hp_out_data),
    .hop_hdr_valid(hp_hdr_valid), .hop_hdr_data(hp_hdr_data),
    .hop_codec_used(hp_codec_used), .hop_pid_mismatch(hp_pid_mismatch)
  );

  for (genvar s = 0; s < NUM_SCHEMES; s++) begin : g_link
    localparam scheme_e SCH = scheme_e'(s);
    localparam int      W   = coded_width(SCH);
    logic [W-1:0] link_w;

    coded_link #(.SCHEME(SCH)) u_link (
      .clk, .rst_n,
      .in_valid (in_valid[s]),
      .in_data  (in_data[s]),
      .in_ready (in_ready[s]),
      .err_i    (err[s][W-1:0]),
      .link_o   (link_w),
      .out_valid(out_valid[s]),
      .out_data (out_data[s]),
      .arq_o    (arq[s]),
      .corr_o   (corr[s]),
      .replay_o (replay[s])
    );

    assign link[s] = MAX_CODED_W'(link_w);
  end
endmodule
