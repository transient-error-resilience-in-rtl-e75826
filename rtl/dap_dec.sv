// dap_dec -- Duplicate Add Parity decoder.
//
// The parity of the more significant copy (odd wires) is regenerated and
// compared with the received parity (wire 64). Equal: the odd copy is output.
// Different: the odd copy or the parity wire is in error and the even copy is
// output. Any single wire error is thereby corrected. The scheme is the
// document's. Combinational.
module dap_dec
  import noc_code_pkg::*;
(
  input  logic [2*FLIT_W:0]  y,
  output logic [FLIT_W-1:0]  d,
  output logic               sel_even
);
  logic [FLIT_W-1:0] odd_set, even_set;

  always_comb begin
    for (int i = 0; i < FLIT_W; i++) begin
      even_set[i] = y[2*i];
      odd_set[i]  = y[2*i+1];
    end
  end

  assign sel_even = (^odd_set) != y[2*FLIT_W];
  assign d        = sel_even ? even_set : odd_set;
endmodule
