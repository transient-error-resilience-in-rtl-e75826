// hdr_coded_path -- source-to-destination path using header-only coding.
//
// Stages: source encoder register -> HOPS intermediate switch codec stages
// (hdr_hop_codec) -> destination decoder register. Every flit is crosstalk
// avoidance coded at the source and decoded at the destination; in between,
// only header flits pass through a decoder and encoder, at each hop. Packets
// are a header whose bits PID_W+CNT_W-1:PID_W give the number of payload
// flits, followed by that many payload flits, with idle cycles allowed
// anywhere; every flit carries its packet id in bits PID_W-1:0
// (PID_W = pid_width(SCHEME)).
// Latency source to destination: HOPS + 2 cycles. hop_hdr_valid/hop_hdr_data
// show the header each hop decoded for its routing logic; the routing and
// switching themselves are outside this design. hop_pid_mismatch pulses when
// a hop sees a payload flit whose coded packet id differs from that of the
// header it follows (same cycle as the flit leaves that hop).
// The path structure follows the document's modified flit structure; HOPS
// and the field layout are this design's choices.
module hdr_coded_path
  import noc_code_pkg::*;
#(
  parameter scheme_e SCHEME = SCH_FPC,
  parameter int      W      = coded_width(SCHEME),
  parameter int      HOPS   = 3,
  parameter int      CNT_W  = 5
)(
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         in_valid,
  input  logic [FLIT_W-1:0]            in_data,
  output logic                         out_valid,
  output logic [FLIT_W-1:0]            out_data,
  output logic [HOPS-1:0]              hop_hdr_valid,
  output logic [HOPS-1:0][FLIT_W-1:0]  hop_hdr_data,
  output logic [HOPS-1:0]              hop_codec_used,
  output logic [HOPS-1:0]              hop_pid_mismatch
);
  logic [HOPS:0]        v;
  logic [HOPS:0][W-1:0] w;
  logic [W-1:0]         src_enc;
  logic [FLIT_W-1:0]    dst_dec;

  if (SCHEME == SCH_FOC) begin : g_foc
    foc_enc u_enc (.d(in_data), .c(src_enc));
    foc_dec u_dec (.c(w[HOPS]), .d(dst_dec));
  end else if (SCHEME == SCH_FTC) begin : g_ftc
    ftc_enc u_enc (.d(in_data), .c(src_enc));
    ftc_dec u_dec (.c(w[HOPS]), .d(dst_dec));
  end else begin : g_fpc
    fpc_enc u_enc (.d(in_data), .c(src_enc));
    fpc_dec u_dec (.c(w[HOPS]), .d(dst_dec));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v[0] <= 1'b0;
      w[0] <= '0;
    end else begin
      v[0] <= in_valid;
      if (in_valid) w[0] <= src_enc;
    end
  end

  for (genvar h = 0; h < HOPS; h++) begin : g_hop
    logic is_hdr;
    hdr_hop_codec #(.SCHEME(SCHEME), .CNT_W(CNT_W)) u_hop (
      .clk, .rst_n,
      .in_valid(v[h]), .in_word(w[h]),
      .out_valid(v[h+1]), .out_word(w[h+1]), .out_is_header(is_hdr),
      .hdr_valid(hop_hdr_valid[h]), .hdr_data(hop_hdr_data[h]),
      .pid_mismatch(hop_pid_mismatch[h])
    );
    assign hop_codec_used[h] = v[h+1] && is_hdr;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= v[HOPS];
      out_data  <= dst_dec;
    end
  end
endmodule
