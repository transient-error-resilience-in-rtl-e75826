// tb_mdr -- self-checking test of mdr_enc and mdr_dec.
//
// Encoder output is compared with a reference built from the code definition
// (flit bit i on wires 2i and 2i+1, XOR parity on the top wires 64 and 65),
// including the example flit 0010 from the code's illustration. The decoder
// must return the flit for a clean word and for every single-wire error.
module tb_mdr;
  logic        clk = 0;
  logic [31:0] d, dd;
  logic [65:0] y, r, ey;
  logic        sel;
  int checks = 0, failures = 0, n_sel = 0;

  always #5 clk = ~clk;

  mdr_enc u_enc (.d(d), .y(y));
  mdr_dec u_dec (.y(r), .d(dd), .sel_even(sel));

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
    d = 32'h2; #1;
    chk(y[7:0] == 8'b0000_1100 && y[64] == 1'b1, "example 0010");
    for (int t = 0; t < 400; t++) begin
      d = $urandom; #1;
      ey = '0;
      for (int i = 0; i < 32; i++) begin ey[2*i] = d[i]; ey[2*i+1] = d[i]; end
      for (int i = 64; i < 66; i++) ey[i] = ^d;
      chk(y == ey, "encoder");
      r = y; #1;
      chk(dd == d && !sel, "clean");
      for (int i = 0; i < 66; i++) begin
        r = y; r[i] = ~r[i]; #1;
        chk(dd == d, "single error corrected");
        if (sel) n_sel++;
      end
      @(posedge clk);
    end
    chk(n_sel > 0, "copy switch used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
