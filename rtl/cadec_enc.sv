// cadec_enc -- Crosstalk Avoidance Double Error Correction (CADEC) encoder.
//
// The 32-bit flit is first coded with the (38,32) Hamming code; every bit of
// that word is then driven on two adjacent wires (duplication keeps adjacent
// wires from switching in opposite directions except across pair boundaries)
// and one parity wire carrying the XOR of the 38 Hamming bits is appended.
// Minimum distance becomes 3 -> 6 (duplication) -> 7 (parity).
// Wire map: Hamming bit i on wires 2i (copy B) and 2i+1 (copy A); parity on
// wire 76. The construction is the document's. The exact wire order is this
// design's choice: it reuses the DAP layout (pairs at 2i/2i+1, parity on the
// top wire). The document also allows a BSC-style layout, with the parity
// wire alternating ends; that layout is not built. Interface: d[31:0] in,
// y[76:0] out. Combinational, no clock.
module cadec_enc
  import noc_code_pkg::*;
(
  input  logic [FLIT_W-1:0]  d,
  output logic [2*HAM_N:0]   y
);
  logic [HAM_N-1:0] h;

  hamming_enc u_ham (.d(d), .c(h));

  always_comb begin
    for (int i = 0; i < HAM_N; i++) begin
      y[2*i]   = h[i];
      y[2*i+1] = h[i];
    end
    y[2*HAM_N] = ^h;
  end
endmodule
