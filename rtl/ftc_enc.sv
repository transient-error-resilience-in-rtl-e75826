// ftc_enc -- Forbidden Transition Condition crosstalk avoidance encoder.
//
// The flit is split into eleven 3-bit sub-channels (the 33rd input is tied
// to 0), each mapped onto four wires by the FTC 3->4 code
// (noc_code_pkg::ftc_map): adjacent wires of a group never switch in opposite
// directions. A grounded shield wire separates neighbouring groups, so the
// condition also holds across boundaries. Wire map: group i on wires
// 5i..5i+3, shield on wire 5i+4 (i < 10). 54 wires. The code equations and
// shielding are the document's. Combinational.
module ftc_enc
  import noc_code_pkg::*;
(
  input  logic [FLIT_W-1:0]                      d,
  output logic [4*FTC_SUBCH+FTC_SUBCH-2:0]       c
);
  logic [3*FTC_SUBCH-1:0] dx;

  assign dx = (3*FTC_SUBCH)'(d);

  always_comb begin
    c = '0;                                   // shield wires stay grounded
    for (int i = 0; i < FTC_SUBCH; i++)
      c[5*i +: 4] = ftc_map(dx[3*i +: 3]);
  end
endmodule
