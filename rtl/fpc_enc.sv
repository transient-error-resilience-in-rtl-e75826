// fpc_enc -- Forbidden Pattern Condition crosstalk avoidance encoder.
//
// Each five-wire group carries a 4->5 FPC codeword (noc_code_pkg::fpc_map),
// which never contains 010 or 101. Codeword wires 0 and 4 equal data bits 0
// and 3. The top data bit of group i is fed in again as the bottom data bit of
// group i+1, so the two wires meeting at every boundary carry the same value
// and no forbidden pattern can straddle it; no shield wires are needed.
// Group 0 takes flit bits 3..0, group i>0 takes bits 3i+3..3i+1 plus bit 3i.
// Eleven groups (55 wires) cover the 32 flit bits; the two spare inputs are
// tied to 0. The code table and boundary rule are the document's; the bit
// assignment is this design's. Combinational.
module fpc_enc
  import noc_code_pkg::*;
(
  input  logic [FLIT_W-1:0]      d,
  output logic [5*FPC_SUBCH-1:0] c
);
  logic [3*FPC_SUBCH:0] dx;

  assign dx = (3*FPC_SUBCH+1)'(d);

  always_comb
    for (int i = 0; i < FPC_SUBCH; i++)
      c[5*i +: 5] = fpc_map(dx[3*i +: 4]);
endmodule
