// foc_enc -- Forbidden Overlap Condition crosstalk avoidance encoder.
//
// The 32-bit flit is split into eight 4-bit sub-channels, each mapped onto
// five wires by the FOC 4->5 code (noc_code_pkg::foc_map), so that no wire
// ever sees both neighbours switch against it (010 never follows 101 on the
// same three wires). The five-wire groups abut without shield wires; the
// code keeps the condition across group boundaries too. 40 wires.
// The code table is the document's. Combinational.
module foc_enc
  import noc_code_pkg::*;
(
  input  logic [FLIT_W-1:0]      d,
  output logic [5*FOC_SUBCH-1:0] c
);
  always_comb
    for (int i = 0; i < FOC_SUBCH; i++)
      c[5*i +: 5] = foc_map(d[4*i +: 4]);
endmodule
