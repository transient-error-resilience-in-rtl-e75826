// arq_receiver -- receiver half of switch-to-switch, flit-level retransmission.
//
// Takes the decoder's combinational result for the slot on the link. A valid
// flit the decoder cannot repair (rx_bad) is not delivered; instead the
// registered ARQ output pulses for one cycle and the next RTT-1 slots are
// dropped, because the sender has already sent them and will send them again
// after the bad one (go-back-N, see rtx_sender). Errors in dropped slots are
// ignored. Outputs out_valid/out_data and arq_o are registered, so the
// decoder adds one pipeline stage. The retransmit-on-uncorrectable rule is the
// document's; the go-back-N drop window is this design's choice.
module arq_receiver
  import noc_code_pkg::*;
#(
  parameter int RTT = 2
)(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              rx_valid,
  input  logic [FLIT_W-1:0] rx_data,
  input  logic              rx_bad,
  output logic              out_valid,
  output logic [FLIT_W-1:0] out_data,
  output logic              arq_o
);
  logic [$clog2(RTT+1)-1:0] drop_cnt;
  logic                     dropping;

  assign dropping = (drop_cnt != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_data  <= '0;
      arq_o     <= 1'b0;
      drop_cnt  <= '0;
    end else begin
      out_data <= rx_data;
      if (dropping) begin
        out_valid <= 1'b0;
        arq_o     <= 1'b0;
        drop_cnt  <= drop_cnt - 1'b1;
      end else if (rx_valid && rx_bad) begin
        out_valid <= 1'b0;
        arq_o     <= 1'b1;
        drop_cnt  <= ($clog2(RTT+1))'(RTT - 1);
      end else begin
        out_valid <= rx_valid;
        arq_o     <= 1'b0;
      end
    end
  end

  // An ARQ is followed by at least RTT-1 cycles without another one.
  assert property (@(posedge clk) disable iff (!rst_n) arq_o |=> !arq_o);
endmodule
