// fpc_dec -- Forbidden Pattern Condition decoder: recovers the 32-bit flit
// from the 55 FPC-coded wires of fpc_enc.
//
// Each five-wire group (wires 5i..5i+4) is inverted by searching the 16-entry
// FPC code table (noc_code_pkg::fpc_unmap). Group 0 supplies flit bits 3..0;
// group i>0 supplies bits 3i+3..3i+1, and its bottom bit, a repeat of the
// lower group's top bit, is not used. The top two bits of the internal
// 34-bit word are the encoder's zero padding and are dropped, which is why
// they stand unused. No error correction. Interface: c[54:0] in, d[31:0]
// out. Combinational, no clock. The code table and the shared-boundary-bit
// combination of groups are the document's; the search-based inversion is
// this design's own.
module fpc_dec
  import noc_code_pkg::*;
(
  input  logic [5*FPC_SUBCH-1:0] c,
  output logic [FLIT_W-1:0]      d
);
  logic [3*FPC_SUBCH:0] dx;

  always_comb begin
    logic [3:0] g;
    dx = '0;
    for (int i = 0; i < FPC_SUBCH; i++) begin
      g = fpc_unmap(c[5*i +: 5]);
      if (i == 0) dx[3:0] = g;
      else        dx[3*i+1 +: 3] = g[3:1];
    end
  end

  assign d = dx[FLIT_W-1:0];
endmodule
