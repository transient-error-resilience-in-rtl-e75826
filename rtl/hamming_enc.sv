// hamming_enc -- (38,32) shortened Hamming encoder.
//
// The 38-bit codeword uses the positional Hamming layout: codeword position p
// (1..38) is bit p-1; positions 1, 2, 4, 8, 16 and 32 hold check bits and the
// 32 data bits fill the remaining positions in ascending order. Each check bit
// at position 2^j is the XOR of every data bit whose position has bit j set,
// so the syndrome of a received word is the XOR of the positions of its
// one-bits. The code has minimum distance 3. It is the inner code of CADEC and,
// alone, the error-detection (ED) scheme. The (38,32) size is the document's;
// the positional bit layout is this design's choice.
// Purely combinational; the surrounding link registers its output.
module hamming_enc
  import noc_code_pkg::*;
(
  input  logic [FLIT_W-1:0] d,
  output logic [HAM_N-1:0]  c
);
  always_comb begin
    logic [HAM_R-1:0] s;
    int k;
    c = '0;
    s = '0;
    k = 0;
    for (int p = 1; p <= HAM_N; p++) begin
      if ((p & (p - 1)) != 0) begin          // not a power of two: data bit
        c[p-1] = d[k];
        if (d[k]) s = s ^ HAM_R'(p);
        k++;
      end
    end
    for (int j = 0; j < HAM_R; j++)
      c[(1 << j) - 1] = s[j];
  end
endmodule
