// hamming_sec_dec -- (38,32) Hamming single-error-correcting decoder.
//
// Computes the syndrome (hamming_syndrome), flips the bit it names and
// extracts the 32 data bits from the non-power-of-two positions. A syndrome
// of 39..63 names no position of the shortened code; such a word carries at
// least two errors and is flagged 'uncorrectable' (data is passed uncorrected).
// That flag is this design's addition: the correction path follows the
// document, which does not give detection logic for this stage.
// Combinational.
module hamming_sec_dec
  import noc_code_pkg::*;
(
  input  logic [HAM_N-1:0]  c,
  output logic [FLIT_W-1:0] d,
  output logic [HAM_R-1:0]  syndrome,
  output logic              corrected,
  output logic              uncorrectable
);
  hamming_syndrome u_syn (.c(c), .s(syndrome));

  always_comb begin
    logic [HAM_N-1:0] fixed;
    int k;
    fixed         = c;
    corrected     = 1'b0;
    uncorrectable = 1'b0;
    if (syndrome != '0) begin
      if (int'(syndrome) <= HAM_N) begin
        fixed[syndrome - 1] = ~c[syndrome - 1];
        corrected = 1'b1;
      end else begin
        uncorrectable = 1'b1;
      end
    end
    d = '0;
    k = 0;
    for (int p = 1; p <= HAM_N; p++) begin
      if ((p & (p - 1)) != 0) begin
        d[k] = fixed[p-1];
        k++;
      end
    end
  end
endmodule
