// hdr_hop_codec -- per-switch codec for the header-only coding flit structure.
//
// With crosstalk avoidance coding, a flit need only be decoded where its
// contents are read. Payload flits carry no routing information, so they are
// encoded once at the source and decoded once at the destination; only the
// header flit is decoded (for routing) and encoded again at every switch on
// the path. The header carries a flit-count field giving the number of
// payload flits that follow, so a switch can tell header from payload without
// a per-flit type field. Every flit also carries a packet id, which the switch
// reads in its coded form to link a payload flit to its header.
// This block is the codec stage of one intermediate switch. A down-counter
// holds the number of payload flits still expected: at zero the arriving flit
// is a header; it is decoded, presented on hdr_valid/hdr_data to the switch's
// routing logic, its count field loaded into the counter, its coded packet id
// (wires PID_C-1:0) kept, and the re-encoded header (a clean codeword)
// forwarded. Otherwise the flit is payload: it is forwarded still coded,
// untouched, the counter decrements, and its coded packet id wires are
// compared with the kept ones; pid_mismatch flags a payload flit whose id is
// not that of the open packet.
// Flit layout: packet id in bits PID_W-1:0 of every flit (the data bits of
// code sub-channel 0, so its coded wires depend on the id alone); flit count
// in header bits PID_W+CNT_W-1:PID_W. One register stage: the flit, and its
// hdr_valid or pid_mismatch, leave one cycle after it arrives.
// The scheme (coding only headers per hop, flit count in the header, coded
// packet id in every flit) is the document's; the field positions and widths
// and the single-stage timing are this design's choices.
module hdr_hop_codec
  import noc_code_pkg::*;
#(
  parameter scheme_e SCHEME = SCH_FPC,
  parameter int      W      = coded_width(SCHEME),
  parameter int      CNT_W  = 5,
  parameter int      PID_W  = pid_width(SCHEME),
  parameter int      PID_C  = pid_wires(SCHEME)
)(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [W-1:0]      in_word,
  output logic              out_valid,
  output logic [W-1:0]      out_word,
  output logic              out_is_header,
  output logic              hdr_valid,
  output logic [FLIT_W-1:0] hdr_data,
  output logic              pid_mismatch
);
  logic [CNT_W-1:0]  remaining;
  logic              is_header;
  logic [FLIT_W-1:0] dec_data;
  logic [W-1:0]      reenc;
  logic [PID_C-1:0]  open_pid;

  assign is_header = (remaining == '0);

  if (SCHEME == SCH_FOC) begin : g_foc
    foc_dec u_dec (.c(in_word), .d(dec_data));
    foc_enc u_enc (.d(dec_data), .c(reenc));
  end else if (SCHEME == SCH_FTC) begin : g_ftc
    ftc_dec u_dec (.c(in_word), .d(dec_data));
    ftc_enc u_enc (.d(dec_data), .c(reenc));
  end else begin : g_fpc
    fpc_dec u_dec (.c(in_word), .d(dec_data));
    fpc_enc u_enc (.d(dec_data), .c(reenc));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      remaining     <= '0;
      out_valid     <= 1'b0;
      out_word      <= '0;
      out_is_header <= 1'b0;
      hdr_valid     <= 1'b0;
      hdr_data      <= '0;
      open_pid      <= '0;
      pid_mismatch  <= 1'b0;
    end else begin
      out_valid    <= in_valid;
      hdr_valid    <= in_valid && is_header;
      pid_mismatch <= in_valid && !is_header && (in_word[PID_C-1:0] != open_pid);
      if (in_valid) begin
        out_is_header <= is_header;
        if (is_header) begin
          out_word  <= reenc;
          hdr_data  <= dec_data;
          remaining <= dec_data[PID_W +: CNT_W];
          open_pid  <= reenc[PID_C-1:0];
        end else begin
          out_word  <= in_word;
          remaining <= remaining - 1'b1;
        end
      end
    end
  end

  // A header report or an id mismatch always accompanies a forwarded flit,
  // and only a payload flit can mismatch.
  assert property (@(posedge clk) disable iff (!rst_n) hdr_valid |-> out_valid && out_is_header);
  assert property (@(posedge clk) disable iff (!rst_n) pid_mismatch |-> out_valid && !out_is_header);
endmodule
