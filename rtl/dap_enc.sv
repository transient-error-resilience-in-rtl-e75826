// dap_enc -- Duplicate Add Parity (DAP) encoder, joint crosstalk avoidance and
// single error correction.
//
// Each flit bit d[i] is driven on two adjacent wires (2i and 2i+1); wire 64
// carries the XOR of all 32 flit bits. Duplication gives distance 2 and
// limits worst-case coupling to (1+2*lambda)*C_L; the parity raises the
// distance to 3. Follows the document's construction. Combinational.
module dap_enc
  import noc_code_pkg::*;
(
  input  logic [FLIT_W-1:0] d,
  output logic [2*FLIT_W:0] y
);
  always_comb begin
    for (int i = 0; i < FLIT_W; i++) begin
      y[2*i]   = d[i];
      y[2*i+1] = d[i];
    end
    y[2*FLIT_W] = ^d;
  end
endmodule
