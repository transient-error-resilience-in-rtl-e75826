// rtx_sender -- sender half of switch-to-switch, flit-level retransmission.
//
// Every cycle the sender hands one slot (valid + flit) to the encoder stage.
// The last RTT slots sent are kept in a shift register, the retransmission
// buffer. RTT is the number of cycles from a slot leaving this block to its
// ARQ coming back (encoder register + decoder/ARQ register = 2).
// When arq_i is high the slot sent RTT cycles ago was bad, and the receiver
// will drop the RTT-1 slots sent after it. The sender then re-sends the whole
// buffer, oldest first (go-back-N): for RTT cycles it sends buffer[RTT-1]
// while the shift register keeps rotating, and in_ready is low. A new ARQ
// during a replay simply restarts it. The document fixes only that
// retransmission is switch-to-switch and per flit; go-back-N over the link
// round trip is this design's choice, giving full throughput with an
// RTT-deep buffer.
// Interface: in_valid/in_ready handshake (flit taken when both high);
// tx_valid/tx_data combinational toward the encoder register.
module rtx_sender
  import noc_code_pkg::*;
#(
  parameter int RTT = 2
)(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [FLIT_W-1:0] in_data,
  output logic              in_ready,
  input  logic              arq_i,
  output logic              tx_valid,
  output logic [FLIT_W-1:0] tx_data,
  output logic              replaying
);
  typedef struct packed {
    logic              valid;
    logic [FLIT_W-1:0] data;
  } slot_t;

  slot_t                  hist [RTT];
  logic [$clog2(RTT+1)-1:0] replay_cnt;
  slot_t                  tx;

  assign replaying = arq_i || (replay_cnt != '0);
  assign in_ready  = !replaying;

  always_comb begin
    if (replaying) tx = hist[RTT-1];
    else           tx = '{valid: in_valid, data: in_data};
  end

  assign tx_valid = tx.valid;
  assign tx_data  = tx.data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < RTT; i++) hist[i] <= '0;
      replay_cnt <= '0;
    end else begin
      hist[0] <= tx;
      for (int i = 1; i < RTT; i++) hist[i] <= hist[i-1];
      if (arq_i)                 replay_cnt <= ($clog2(RTT+1))'(RTT - 1);
      else if (replay_cnt != '0) replay_cnt <= replay_cnt - 1'b1;
    end
  end

  // A flit is never accepted from upstream while the buffer is replayed.
  assert property (@(posedge clk) disable iff (!rst_n) replaying |-> !in_ready);
endmodule
