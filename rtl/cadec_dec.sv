// cadec_dec -- CADEC decoder: corrects any two wire errors in the 77-bit word.
//
// Stage 1 picks one of the two received Hamming copies
// (A = odd wires, B = even wires, p = wire 76):
//   * parity(A) != parity(B): exactly one copy agrees with p; take it.
//   * parity(A) == parity(B): run the Hamming syndrome of A as a double-error
//     detector; zero -> take A, otherwise take B.
// Stage 2 corrects one error in the chosen copy with the (38,32) SEC decoder.
// With at most two wire errors the chosen copy holds at most one error.
// When parities differ the syndrome of A is not needed ('ded_used' = 0), which
// is where the scheme saves decoder energy in the common single-error case.
// 'uncorrectable' (stage-2 syndrome outside 1..38) is this design's detection
// of heavier error patterns, used to request retransmission; the document gives
// only the correcting path. Combinational.
module cadec_dec
  import noc_code_pkg::*;
(
  input  logic [2*HAM_N:0]   y,
  output logic [FLIT_W-1:0]  d,
  output logic               corrected,
  output logic               uncorrectable,
  output logic               sel_b,
  output logic               ded_used
);
  logic [HAM_N-1:0] cpy_a, cpy_b, chosen;
  logic [HAM_R-1:0] syn_a;
  logic             par_a, par_b, par_tx, sec_corr;

  always_comb begin
    for (int i = 0; i < HAM_N; i++) begin
      cpy_b[i] = y[2*i];
      cpy_a[i] = y[2*i+1];
    end
  end

  assign par_a  = ^cpy_a;
  assign par_b  = ^cpy_b;
  assign par_tx = y[2*HAM_N];

  hamming_syndrome u_ded (.c(cpy_a), .s(syn_a));

  always_comb begin
    ded_used = (par_a == par_b);
    if (!ded_used) sel_b = (par_b == par_tx);
    else           sel_b = (syn_a != '0);
  end

  assign chosen = sel_b ? cpy_b : cpy_a;

  hamming_sec_dec u_sec (
    .c(chosen), .d(d), .syndrome(),
    .corrected(sec_corr), .uncorrectable(uncorrectable)
  );

  // Any repair: a copy was rejected, or the chosen copy was fixed.
  assign corrected = !uncorrectable && (sec_corr || (cpy_a != cpy_b) || (par_a != par_tx));
endmodule
