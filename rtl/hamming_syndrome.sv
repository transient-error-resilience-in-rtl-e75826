// hamming_syndrome -- syndrome of a (38,32) positional Hamming word.
//
// The syndrome is the XOR of the positions (1..38) of all one-bits. It is zero
// for a codeword, equals the position of a single flipped bit, and is non-zero
// for any two flipped bits (minimum distance 3), which makes this block the
// double-error detector of the CADEC decoder and of the ED scheme.
// Interface: c[37:0] in (bit p-1 = position p), s[5:0] out. Combinational,
// no clock. The (38,32) shortened Hamming code is the document's; the
// positional bit layout is this design's choice, since any layout gives the
// same code properties.
module hamming_syndrome
  import noc_code_pkg::*;
(
  input  logic [HAM_N-1:0] c,
  output logic [HAM_R-1:0] s
);
  always_comb begin
    s = '0;
    for (int p = 1; p <= HAM_N; p++)
      if (c[p-1]) s = s ^ HAM_R'(p);
  end
endmodule
