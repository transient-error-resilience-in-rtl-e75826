// foc_dec -- Forbidden Overlap Condition decoder: recovers the 32-bit flit
// from the 40 FOC-coded wires of foc_enc.
//
// Each five-wire group (wires 5i..5i+4) is inverted by searching the 16-entry
// FOC code table (noc_code_pkg::foc_unmap) and gives flit bits 4i+3..4i. The
// table search keeps the decoder consistent with the encoder by construction.
// There is no error correction; a word that is not a codeword decodes to 0 in
// its group. Interface: c[39:0] in, d[31:0] out. Combinational, no clock.
// The code table is the document's; the search-based inversion is this
// design's own way of building the decoder.
module foc_dec
  import noc_code_pkg::*;
(
  input  logic [5*FOC_SUBCH-1:0] c,
  output logic [FLIT_W-1:0]      d
);
  always_comb
    for (int i = 0; i < FOC_SUBCH; i++)
      d[4*i +: 4] = foc_unmap(c[5*i +: 5]);
endmodule
