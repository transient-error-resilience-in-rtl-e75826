// tb_cadec -- self-checking test of cadec_enc and cadec_dec.
//
// Encoder: compared with the reference (Hamming word duplicated into wire
// pairs, XOR parity on wire 76). Decoder: every single-wire error and every
// pair of wire errors is corrected for a set of random flits; both decoder
// paths (parity comparison alone, and the syndrome check) must be used; a
// four-wire pattern leaving an invalid syndrome must request retransmission.
module tb_cadec;
  import tb_ref_pkg::*;
  logic        clk = 0;
  logic [31:0] d, dd;
  logic [76:0] y, r, exp_y;
  logic        corr, unc, sel_b, ded_used;
  int checks = 0, failures = 0;
  int n_ded = 0, n_par = 0;

  always #5 clk = ~clk;

  cadec_enc u_enc (.d(d), .y(y));
  cadec_dec u_dec (.y(r), .d(dd), .corrected(corr), .uncorrectable(unc), .sel_b(sel_b), .ded_used(ded_used));

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s d=%h r=%h dd=%h", what, d, r, dd);
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
    for (int t = 0; t < 6; t++) begin
      logic [37:0] h;
      d = (t == 0) ? 32'h0 : $urandom;
      h = ref_ham_enc(d);
      for (int i = 0; i < 38; i++) begin exp_y[2*i] = h[i]; exp_y[2*i+1] = h[i]; end
      exp_y[76] = ^h;
      #1;
      chk(y == exp_y, "encoder");
      r = y; #1;
      chk(dd == d && !unc && !corr, "no error");
      for (int i = 0; i < 77; i++) begin
        r = y; r[i] = ~r[i]; #1;
        chk(dd == d && !unc, "one error");
        for (int j = i + 1; j < 77; j++) begin
          r = y; r[i] = ~r[i]; r[j] = ~r[j]; #1;
          chk(dd == d && !unc && corr, "two errors");
          if (ded_used) n_ded++; else n_par++;
        end
      end
      // both copies of Hamming positions 7 and 32 flipped: syndrome 39
      r = y; r[12] = ~r[12]; r[13] = ~r[13]; r[62] = ~r[62]; r[63] = ~r[63]; #1;
      chk(unc, "uncorrectable flagged");
      @(posedge clk);
    end
    chk(n_ded > 0 && n_par > 0, "both selection paths used");
    $display("paths: parity-only=%0d syndrome=%0d", n_par, n_ded);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
