// tb_ed -- self-checking test of the error-detection scheme: hamming_enc on
// the sender, ed_dec on the receiver. Clean words pass with error low; every
// single and every double wire error must raise error (-> ARQ).
module tb_ed;
  import tb_ref_pkg::*;
  logic        clk = 0;
  logic [31:0] d, dd;
  logic [37:0] c, r;
  logic        err;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  hamming_enc u_enc (.d(d), .c(c));
  ed_dec      u_dec (.c(r), .d(dd), .error(err));

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s d=%h r=%h", what, d, r);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 50; t++) begin
      d = $urandom; #1;
      r = ref_ham_enc(d); #1;
      chk(!err && dd == d, "clean");
      chk(c == ref_ham_enc(d), "encoder");
      for (int i = 0; i < 38; i++) begin
        r = c; r[i] = ~r[i]; #1;
        chk(err, "single detected");
        for (int j = i + 1; j < 38; j++) begin
          r = c; r[i] = ~r[i]; r[j] = ~r[j]; #1;
          chk(err, "double detected");
        end
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
