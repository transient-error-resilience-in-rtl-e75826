// ftc_dec -- Forbidden Transition Condition decoder: recovers the 32-bit flit
// from the 54 FTC-coded wires of ftc_enc.
//
// Each four-wire group (wires 5i..5i+3) is inverted by searching the 8-entry
// FTC code table (noc_code_pkg::ftc_unmap) and gives bits 3i+2..3i of an
// internal 33-bit word. The shield wires (5i+4) carry nothing and are not
// read. Bit 32 of the internal word is the encoder's zero padding and is
// dropped, which is why it stands unused. No error correction. Interface:
// c[53:0] in, d[31:0] out. Combinational, no clock. The code equations and
// the shielded grouping are the document's; the search-based inversion is
// this design's own.
module ftc_dec
  import noc_code_pkg::*;
(
  input  logic [4*FTC_SUBCH+FTC_SUBCH-2:0] c,
  output logic [FLIT_W-1:0]                d
);
  logic [3*FTC_SUBCH-1:0] dx;

  always_comb
    for (int i = 0; i < FTC_SUBCH; i++)
      dx[3*i +: 3] = ftc_unmap(c[5*i +: 4]);

  assign d = dx[FLIT_W-1:0];
endmodule
