// tb_arq_receiver -- self-checking test of arq_receiver (RTT = 2).
//
// Random slots (valid, data, bad) are presented. Expected behaviour, one
// cycle later: a good valid slot is delivered with its data; a bad valid slot
// is not delivered and ARQ pulses; the slot right after an ARQ is dropped
// whatever it is, and raises no ARQ.
module tb_arq_receiver;
  logic        clk = 0, rst_n = 0;
  logic        rx_valid, rx_bad, out_valid, arq;
  logic [31:0] rx_data, out_data;
  int checks = 0, failures = 0, n_arq = 0, n_drop = 0, n_del = 0;
  bit          exp_v = 0, exp_arq = 0;
  logic [31:0] exp_d = 0;
  int          drop = 0;

  always #5 clk = ~clk;

  arq_receiver #(.RTT(2)) dut (.clk, .rst_n, .rx_valid, .rx_data, .rx_bad,
                               .out_valid, .out_data, .arq_o(arq));

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s t=%0t", what, $time);
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
    rx_valid = 0; rx_bad = 0; rx_data = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    repeat (10000) begin
      @(negedge clk);
      chk(out_valid == exp_v && arq == exp_arq, "valid/arq");
      if (exp_v) chk(out_data == exp_d, "data");
      rx_valid = $urandom_range(3, 0) != 0;
      rx_bad   = $urandom_range(3, 0) == 0;
      rx_data  = $urandom;
      exp_d = rx_data;
      if (drop > 0) begin
        drop--; exp_v = 0; exp_arq = 0; n_drop++;
      end else if (rx_valid && rx_bad) begin
        exp_v = 0; exp_arq = 1; drop = 1; n_arq++;
      end else begin
        exp_v = rx_valid; exp_arq = 0;
        if (rx_valid) n_del++;
      end
    end
    chk(n_arq > 0 && n_drop > 0 && n_del > 0, "all cases seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
