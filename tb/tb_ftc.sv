// tb_ftc -- self-checking test of ftc_enc and ftc_dec.
//
// The eight 3-bit values must map to eight distinct four-wire words; shield
// wires (every fifth wire) must stay at 0; random flit sequences must never
// switch two adjacent wires of the 54-wire link in opposite directions
// (01 -> 10 or 10 -> 01); and the decoder must return the flit.
module tb_ftc;
  logic        clk = 0;
  logic [31:0] d, dd;
  logic [53:0] c, prev;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ftc_enc u_enc (.d(d), .c(c));
  ftc_dec u_dec (.c(c), .d(dd));

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s d=%h c=%h", what, d, c);
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
    logic [3:0] seen [8];
    for (int v = 0; v < 8; v++) begin
      d = {2'b0, {10{3'(v)}}}; #1;
      seen[v] = c[3:0];
      for (int w = 0; w < v; w++) chk(seen[w] != seen[v], "distinct codewords");
      chk(dd == d, "roundtrip table");
    end
    d = 32'hffff_ffff; #1;
    chk(c[3:0] == 4'b1111, "all ones group");
    prev = c;
    for (int t = 0; t < 5000; t++) begin
      bit ok;
      ok = 1;
      d = $urandom; #1;
      chk(dd == d, "roundtrip");
      for (int g = 0; g < 10; g++) chk(c[5*g+4] == 1'b0, "shield grounded");
      for (int i = 0; i + 1 < 54; i++)
        if ((prev[i +: 2] == 2'b01 && c[i +: 2] == 2'b10) ||
            (prev[i +: 2] == 2'b10 && c[i +: 2] == 2'b01)) ok = 0;
      chk(ok, "forbidden transition");
      prev = c;
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
