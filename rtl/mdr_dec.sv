// mdr_dec -- Modified Dual Rail decoder (single error correction).
//
// If the two parity wires disagree, the single error sits on a parity wire,
// both data copies are clean and the odd copy is output. Otherwise decoding is
// that of DAP: regenerate the parity of the odd copy, compare with the
// received parity and output the even copy on mismatch. The document only
// says MDR decodes like DAP; the use of the second parity copy is this
// design's choice. Combinational.
module mdr_dec
  import noc_code_pkg::*;
(
  input  logic [2*FLIT_W+1:0] y,
  output logic [FLIT_W-1:0]   d,
  output logic                sel_even
);
  logic [FLIT_W-1:0] odd_set, even_set;

  always_comb begin
    for (int i = 0; i < FLIT_W; i++) begin
      even_set[i] = y[2*i];
      odd_set[i]  = y[2*i+1];
    end
  end

  assign sel_even = (y[2*FLIT_W] == y[2*FLIT_W+1]) && ((^odd_set) != y[2*FLIT_W]);
  assign d        = sel_even ? even_set : odd_set;
endmodule
