// tb_hamming -- self-checking test of hamming_enc and hamming_sec_dec.
//
// Checks the encoder against an independent parity-check-matrix model, known
// vectors, that every codeword has zero syndrome, that every single-bit error
// is located and corrected, and that no double-bit error looks clean.
module tb_hamming;
  import tb_ref_pkg::*;
  logic        clk = 0;
  logic [31:0] d, dd;
  logic [37:0] c, r;
  logic [5:0]  syn;
  logic        corr, unc;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  hamming_enc     u_enc (.d(d), .c(c));
  hamming_sec_dec u_dec (.c(r), .d(dd), .syndrome(syn), .corrected(corr), .uncorrectable(unc));

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s d=%h c=%h r=%h", what, d, c, r);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // known vectors: data bit 0 sits at position 3 -> checks at 1 and 2
    d = 32'h0; #1; chk(c == 38'h0, "enc zero");
    d = 32'h1; #1; chk(c == 38'h7, "enc bit0");
    for (int t = 0; t < 300; t++) begin
      d = $urandom;
      #1;
      chk(c == ref_ham_enc(d), "enc ref");
      r = c; #1;
      chk(syn == 0 && !corr && !unc && dd == d, "clean decode");
      for (int i = 0; i < 38; i++) begin
        r = c; r[i] = ~r[i]; #1;
        chk(dd == d && corr && !unc && int'(syn) == i + 1, "single error");
      end
      for (int n = 0; n < 20; n++) begin
        int i, j;
        i = $urandom_range(37, 0);
        j = $urandom_range(37, 0);
        if (i == j) continue;
        r = c; r[i] = ~r[i]; r[j] = ~r[j]; #1;
        chk(syn != 0, "double error visible");
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
