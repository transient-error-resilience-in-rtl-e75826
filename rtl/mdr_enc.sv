// mdr_enc -- Modified Dual Rail (MDR) encoder.
//
// Like DAP (flit bit d[i] on wires 2i and 2i+1), but the parity bit is itself
// duplicated onto two adjacent wires, 64 and 65, so that the parity wire also
// has a neighbour that always switches with it. 66 wires. The code is the
// document's; placing both parity copies at the top end follows its example
// table. Combinational.
module mdr_enc
  import noc_code_pkg::*;
(
  input  logic [FLIT_W-1:0]   d,
  output logic [2*FLIT_W+1:0] y
);
  always_comb begin
    for (int i = 0; i < FLIT_W; i++) begin
      y[2*i]   = d[i];
      y[2*i+1] = d[i];
    end
    y[2*FLIT_W]   = ^d;
    y[2*FLIT_W+1] = ^d;
  end
endmodule
