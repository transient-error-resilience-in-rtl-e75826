// tb_rtx_sender -- self-checking test of rtx_sender (RTT = 2).
//
// The testbench plays the link and the receiver: each slot sent reaches the
// receiver one cycle later; the receiver model randomly declares a valid,
// non-dropped slot bad, answers with a one-cycle ARQ one cycle after that and
// drops the following slot (go-back-N). The flits the receiver model keeps
// must be exactly the flits accepted from upstream, in order, without loss
// or duplication, and in_ready must be low whenever ARQ is seen.
module tb_rtx_sender;
  logic        clk = 0, rst_n = 0;
  logic        in_valid, in_ready, arq, tx_valid, replaying;
  logic [31:0] in_data, tx_data;
  int checks = 0, failures = 0, n_arq = 0, n_back2back = 0;

  logic [31:0] sent_q [$];
  logic        link_v = 0;
  logic [31:0] link_d = 0;
  int          drop = 0;
  logic [31:0] cnt = 0;
  bit          arq_prev_replay = 0;

  always #5 clk = ~clk;

  rtx_sender #(.RTT(2)) dut (.clk, .rst_n, .in_valid, .in_data, .in_ready,
                             .arq_i(arq), .tx_valid, .tx_data, .replaying);

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
    in_valid = 0; in_data = 0; arq = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    repeat (20000) begin
      @(posedge clk);
      if (rst_n) begin
        bit arq_n;
        arq_n = 0;
        // receiver model: slot sent last cycle
        if (drop > 0) drop--;
        else if (link_v) begin
          if ($urandom_range(4, 0) == 0) begin
            arq_n = 1; drop = 1;
          end else begin
            chk(sent_q.size() > 0 && sent_q[0] == link_d, "in-order delivery");
            if (sent_q.size() > 0) void'(sent_q.pop_front());
          end
        end
        if (arq) chk(!in_ready, "not ready during replay");
        if (arq && arq_prev_replay) n_back2back++;
        arq_prev_replay = replaying;
        link_v = tx_valid;
        link_d = tx_data;
        if (in_valid && in_ready) begin
          sent_q.push_back(in_data);
          cnt++;
        end
        if (arq_n) n_arq++;
        arq      <= arq_n;
        in_valid <= ($urandom_range(4, 0) != 0);
        in_data  <= (cnt << 8) | 32'($urandom_range(255, 0));
      end
    end
    in_valid <= 0;
    chk(n_arq > 100 && n_back2back > 0, "ARQ and ARQ during replay exercised");
    $display("arq=%0d arq-during-replay=%0d backlog=%0d", n_arq, n_back2back, sent_q.size());
    chk(sent_q.size() <= 3, "no flit lost");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
