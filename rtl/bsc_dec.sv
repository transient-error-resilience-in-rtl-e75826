// bsc_dec -- Boundary Shift Code decoder.
//
// Keeps its own phase flip-flop, reset to 0 and toggled by every received
// valid flit, mirroring bsc_enc. In phase 1 the received word is shifted back
// by one wire (parity from wire 0); then DAP decoding follows: the parity of
// the odd copy is compared with the received parity and the even copy is used
// on mismatch ('sel_even' reports that). Corrects any single wire error.
// Combinational output.
module bsc_dec
  import noc_code_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              valid,
  input  logic [2*FLIT_W:0] y,
  output logic [FLIT_W-1:0] d,
  output logic              sel_even
);
  logic                phase;
  logic [2*FLIT_W-1:0] dup;
  logic                par;
  logic [FLIT_W-1:0]   odd_set, even_set;

  always_comb begin
    if (!phase) {par, dup} = y;
    else        {dup, par} = y;
    for (int i = 0; i < FLIT_W; i++) begin
      even_set[i] = dup[2*i];
      odd_set[i]  = dup[2*i+1];
    end
    sel_even = ((^odd_set) != par);
    d = sel_even ? even_set : odd_set;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     phase <= 1'b0;
    else if (valid) phase <= ~phase;
  end
endmodule
