// tb_fpc -- self-checking test of fpc_enc and fpc_dec.
//
// Group 0 must match the FPC 4->5 code table (a literal table here); no
// 55-wire link word may contain 010 or 101 on any three adjacent wires,
// including across group boundaries; and the decoder must return the flit.
module tb_fpc;
  logic        clk = 0;
  logic [31:0] d, dd;
  logic [54:0] c;
  int checks = 0, failures = 0;
  localparam logic [4:0] TABLE [16] = '{5'b00000, 5'b00001, 5'b00110, 5'b00011,
                                        5'b01100, 5'b00111, 5'b01110, 5'b01111,
                                        5'b10000, 5'b10001, 5'b11000, 5'b10011,
                                        5'b11100, 5'b11001, 5'b11110, 5'b11111};

  always #5 clk = ~clk;

  fpc_enc u_enc (.d(d), .c(c));
  fpc_dec u_dec (.c(c), .d(dd));

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
      d = 32'(v); #1;
      chk(c[4:0] == TABLE[v], "table");
      chk(dd == d, "roundtrip table");
    end
    for (int t = 0; t < 5000; t++) begin
      bit ok;
      ok = 1;
      d = $urandom; #1;
      chk(dd == d, "roundtrip");
      for (int i = 0; i + 2 < 55; i++)
        if (c[i +: 3] == 3'b010 || c[i +: 3] == 3'b101) ok = 0;
      chk(ok, "forbidden pattern");
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
