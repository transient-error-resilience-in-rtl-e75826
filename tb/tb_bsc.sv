// tb_bsc -- self-checking test of bsc_enc and bsc_dec.
//
// A stream of flits with idle cycles passes encoder -> (error) -> decoder, the
// decoder clocked one cycle behind as on a pipelined link. Checks: the
// parity wire sits on top for the 1st, 3rd, ... flit and at the bottom for the
// 2nd, 4th, ..., the word otherwise holds the duplicated flit, consecutive
// flits never share a pair boundary, idle cycles do not advance the phase, and
// every single-wire error is corrected. The first six flits are the worked
// example of the joint-code flit table (4-bit flits 0010, 0010, 1100, 1010,
// 0100, 0011 in consecutive cycles), checked against the literal 9-wire
// words of that table.
module tb_bsc;
  logic        clk = 0, rst_n = 0;
  logic        ev, dv, ev_q;
  logic [31:0] d, dd, d_q;
  logic [64:0] y, y_q, r, ey;
  logic        phase, sel;
  int checks = 0, failures = 0, nflit = 0, n_ph1 = 0, n_idle = 0;

  always #5 clk = ~clk;

  // Worked example: flit and expected word, shown as {top wire, wires 7:0}
  // for odd cycles (parity on top) and as wires 8:0 for even cycles (parity
  // at the bottom). Flit 1010 has even parity, so its parity wire is 0, as
  // the parity equation c_k = d_0 ^ ... ^ d_k-1 requires.
  localparam logic [3:0] EX_D [6] = '{4'b0010, 4'b0010, 4'b1100, 4'b1010, 4'b0100, 4'b0011};
  localparam logic [8:0] EX_Y [6] = '{9'b1_00001100, 9'b00001100_1, 9'b0_11110000,
                                      9'b11001100_0, 9'b1_00110000, 9'b00001111_0};

  bsc_enc u_enc (.clk, .rst_n, .valid(ev), .d(d), .y(y), .phase(phase));
  bsc_dec u_dec (.clk, .rst_n, .valid(dv), .y(r), .d(dd), .sel_even(sel));

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s n=%0d d=%h y=%h", what, nflit, d, y);
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
    ev = 0; dv = 0; d = 0; r = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      ev = ($urandom_range(3, 0) != 0);
      d  = $urandom;
      if (t < 6) begin
        ev = 1'b1;
        d  = 32'(EX_D[t]);
      end
      #1;
      if (t < 6)
        chk(((t % 2 == 0) ? {y[64], y[7:0]} : y[8:0]) == EX_Y[t] &&
            ((t % 2 == 0) ? y[63:8] == '0 : y[64:9] == '0), "worked example");
      if (ev) begin
        logic [63:0] dup;
        for (int i = 0; i < 32; i++) begin dup[2*i] = d[i]; dup[2*i+1] = d[i]; end
        ey = (nflit % 2 == 0) ? {^d, dup} : {dup, ^d};
        chk(y == ey, "encoder placement");
        if (nflit % 2 != 0) n_ph1++;
        nflit++;
      end else n_idle++;
      // decoder sees last cycle's word, with a random single-wire error
      dv = 1'b0;
      if (t > 0) begin
        dv = ev_q;
        r = y_q;
        if ($urandom_range(1, 0) != 0) r[$urandom_range(64, 0)] ^= 1'b1;
        #1;
        if (dv) chk(dd == d_q, "decode");
      end
      @(posedge clk);
    end
    chk(n_ph1 > 0 && n_idle > 0, "both phases and idle cycles");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always_ff @(posedge clk) begin
    ev_q <= ev;
    y_q  <= y;
    d_q  <= d;
  end
endmodule
