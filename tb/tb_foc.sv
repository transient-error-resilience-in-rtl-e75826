// tb_foc -- self-checking test of foc_enc and foc_dec.
//
// Each five-wire group must match the FOC 4->5 code table (kept here as a
// literal table); random flit sequences must never produce a 010 -> 101 or
// 101 -> 010 overlap on any three adjacent wires of the 40-wire link,
// including across group boundaries; and the decoder must return the flit.
module tb_foc;
  logic        clk = 0;
  logic [31:0] d, dd;
  logic [39:0] c, prev;
  int checks = 0, failures = 0;
  localparam logic [4:0] TABLE [16] = '{5'b00000, 5'b00100, 5'b00001, 5'b00101,
                                        5'b00011, 5'b00111, 5'b10011, 5'b10111,
                                        5'b10000, 5'b10100, 5'b10001, 5'b10101,
                                        5'b11000, 5'b11100, 5'b11001, 5'b11101};

  always #5 clk = ~clk;

  foc_enc u_enc (.d(d), .c(c));
  foc_dec u_dec (.c(c), .d(dd));

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
    for (int v = 0; v < 16; v++) begin
      d = {8{4'(v)}}; #1;
      for (int g = 0; g < 8; g++) chk(c[5*g +: 5] == TABLE[v], "table");
      chk(dd == d, "roundtrip table");
    end
    prev = c;
    for (int t = 0; t < 5000; t++) begin
      bit ok;
      ok = 1;
      d = $urandom; #1;
      chk(dd == d, "roundtrip");
      for (int i = 0; i + 2 < 40; i++)
        if ((prev[i +: 3] == 3'b010 && c[i +: 3] == 3'b101) ||
            (prev[i +: 3] == 3'b101 && c[i +: 3] == 3'b010)) ok = 0;
      chk(ok, "forbidden overlap");
      prev = c;
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
