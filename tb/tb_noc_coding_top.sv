// tb_noc_coding_top -- end-to-end test of the coded link fabric, all eight
// links at their default sizes, run simultaneously.
//
// Random flits with random idle cycles enter every link; transient errors are
// injected on the link wires within each scheme's capability:
//   CADEC  0, 1 or 2 random wire errors, or a 4-wire pattern that leaves an
//          invalid syndrome (must be retransmitted)
//   ED     0, 1 or 2 random wire errors (every error retransmitted)
//   DAP, BSC, MDR   0 or 1 wire error
//   FOC, FTC, FPC   no errors
// A scoreboard per link requires every accepted flit to come out once, in
// order and unchanged. Links without retransmission must deliver exactly two
// cycles after acceptance; ARQ links must do so whenever no replay happened.
// Counted mechanisms, each required at least once: error corrected (CADEC,
// DAP, BSC, MDR), CADEC double-error correction, ARQ (CADEC, ED), ARQ arriving
// during a replay, upstream stall while replaying, idle link cycles.
// The header-only coded path carries 16-flit messages (a header whose count
// field, bits 8:4, says 15, then 15 payload flits; packet id in bits 3:0 of
// every flit) with idle gaps; every flit must arrive in order PATH_HOPS+2
// cycles later, each hop must decode every header, and hop codecs must be
// used for headers only (payload bypasses counted). About one payload flit in
// sixteen carries a wrong packet id, which every hop must flag.
module tb_noc_coding_top;
  import noc_code_pkg::*;
  import tb_ref_pkg::*;

  localparam int N = NUM_SCHEMES;
  localparam int CYCLES = 6000;

  logic                         clk = 0, rst_n = 0;
  logic [N-1:0]                 in_valid, in_ready, out_valid, arq, corr, replay;
  logic [N-1:0][FLIT_W-1:0]     in_data, out_data;
  logic [N-1:0][MAX_CODED_W-1:0] err, link;

  int checks = 0, failures = 0;
  int cyc = 0;
  typedef struct { logic [31:0] d; int t; } ent_t;
  ent_t q [N][$];
  int n_corr [N], n_arq [N], n_stall [N], n_arq_in_replay [N], n_del [N];
  int n_dbl_corr = 0, n_idle = 0, n_fast_arq = 0;
  int inj_n [N], inj_q [N];
  bit replay_q [N];

  always #5 clk = ~clk;

  logic                           hp_in_valid, hp_out_valid;
  logic [FLIT_W-1:0]              hp_in_data, hp_out_data;
  logic [PATH_HOPS-1:0]           hp_hdr_valid, hp_codec_used, hp_pid_mismatch;
  logic [PATH_HOPS-1:0][FLIT_W-1:0] hp_hdr_data;
  ent_t hpq [$];
  logic [31:0] hdrq [PATH_HOPS][$];
  int hp_hdr_sent = 0, hp_pay_sent = 0, hp_codec_uses = 0, hp_bypass = 0, hp_del = 0;

  noc_coding_top dut (.clk, .rst_n, .in_valid, .in_data, .in_ready, .err, .link,
                      .out_valid, .out_data, .arq, .corr, .replay,
                      .hp_in_valid, .hp_in_data, .hp_out_valid, .hp_out_data,
                      .hp_hdr_valid, .hp_hdr_data, .hp_codec_used,
                      .hp_pid_mismatch);

  // 16-flit messages on the header-only coded path
  int hp_left = 0, hp_bad_sent = 0, hp_flags = 0;
  logic [3:0] hp_pid;
  always @(negedge clk) begin
    if (!rst_n || stop_traffic || $urandom_range(4, 0) == 0) hp_in_valid <= 1'b0;
    else begin
      logic [31:0] f;
      hp_in_valid <= 1'b1;
      if (hp_left == 0) begin
        hp_pid = 4'($urandom);
        f = {23'($urandom), 5'd15, hp_pid};
        for (int h = 0; h < PATH_HOPS; h++) hdrq[h].push_back(f);
        hp_left = 15;
        hp_hdr_sent++;
      end else begin
        f = {28'($urandom), hp_pid};
        if ($urandom_range(15, 0) == 0) begin
          f[3:0] = hp_pid ^ 4'($urandom_range(15, 1));
          hp_bad_sent++;
        end
        hp_left--;
        hp_pay_sent++;
      end
      hp_in_data <= f;
    end
  end

  always @(posedge clk) if (rst_n) begin
    ent_t e;
    if (hp_in_valid) hpq.push_back('{d: hp_in_data, t: cyc});
    if (hp_out_valid) begin
      hp_del++;
      chk(hpq.size() > 0, "path: flit from nowhere");
      if (hpq.size() > 0) begin
        e = hpq.pop_front();
        chk(hp_out_data == e.d, "path: data");
        chk(cyc - e.t == PATH_HOPS + 2, "path: latency");
      end
    end
    for (int h = 0; h < PATH_HOPS; h++) begin
      if (hp_codec_used[h]) hp_codec_uses++;
      if (hp_pid_mismatch[h]) hp_flags++;
      if (hp_hdr_valid[h]) begin
        chk(hdrq[h].size() > 0 && hdrq[h][0] == hp_hdr_data[h], "path: hop header");
        if (hdrq[h].size() > 0) void'(hdrq[h].pop_front());
      end
    end
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL %s cyc=%0d", what, cyc);
    end
  endtask

  initial begin
    repeat (CYCLES + 2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // stimulus on the falling edge
  bit stop_traffic = 0;
  always @(negedge clk) begin
    for (int s = 0; s < N; s++) begin
      int r, w, n;
      logic [127:0] m;
      w = coded_width(scheme_e'(s));
      in_valid[s] <= !stop_traffic && ($urandom_range(5, 0) != 0);
      in_data[s]  <= $urandom;
      r = $urandom_range(99, 0);
      n = 0;
      m = '0;
      if (!stop_traffic) begin
        case (scheme_e'(s))
          SCH_CADEC: begin
            if (r >= 88) begin
              m[12] = 1; m[13] = 1; m[62] = 1; m[63] = 1; n = 4;
            end else begin
              n = (r < 50) ? 0 : (r < 70) ? 1 : 2;
              m = rand_mask(w, n);
            end
          end
          SCH_ED:  begin n = (r < 75) ? 0 : (r < 88) ? 1 : 2; m = rand_mask(w, n); end
          SCH_DAP, SCH_BSC, SCH_MDR: begin n = (r < 60) ? 0 : 1; m = rand_mask(w, n); end
          default: n = 0;
        endcase
      end
      err[s] <= MAX_CODED_W'(m);
      inj_n[s] = n;
    end
  end

  // scoreboard on the rising edge (values before the edge)
  always @(posedge clk) begin
    if (rst_n) begin
      cyc++;
      for (int s = 0; s < N; s++) begin
        if (in_valid[s] && in_ready[s]) q[s].push_back('{d: in_data[s], t: cyc});
        if (in_valid[s] && !in_ready[s]) n_stall[s]++;
        if (!in_valid[s] && s == 0) n_idle++;
        if (out_valid[s]) begin
          n_del[s]++;
          if (q[s].size() == 0) chk(0, $sformatf("link %0d: flit from nowhere", s));
          else begin
            ent_t e;
            e = q[s].pop_front();
            chk(out_data[s] == e.d, $sformatf("link %0d: data", s));
            if (!uses_arq(scheme_e'(s))) chk(cyc - e.t == 2, $sformatf("link %0d: latency", s));
            else begin
              chk(cyc - e.t >= 2, $sformatf("link %0d: latency", s));
              if (cyc - e.t == 2) n_fast_arq++;
            end
          end
        end
        if (corr[s]) begin
          n_corr[s]++;
          if (s == 0 && inj_q[s] == 2) n_dbl_corr++;
        end
        if (arq[s]) begin
          n_arq[s]++;
          if (replay_q[s]) n_arq_in_replay[s]++;
        end
        replay_q[s] = replay[s];
        inj_q[s] = inj_n[s];
      end
    end
  end

  initial begin
    for (int s = 0; s < N; s++) begin
      n_corr[s] = 0; n_arq[s] = 0; n_stall[s] = 0; n_arq_in_replay[s] = 0;
      n_del[s] = 0; inj_n[s] = 0; inj_q[s] = 0; replay_q[s] = 0;
    end
    in_valid = '0; in_data = '0; err = '0; hp_in_valid = 0; hp_in_data = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (CYCLES) @(posedge clk);
    stop_traffic = 1;
    repeat (20) @(posedge clk);
    for (int s = 0; s < N; s++) begin
      chk(q[s].size() == 0, $sformatf("link %0d drained", s));
      chk(n_del[s] > CYCLES / 3, $sformatf("link %0d throughput", s));
      $display("link %0d: delivered=%0d corrected=%0d arq=%0d arq-in-replay=%0d stalls=%0d",
               s, n_del[s], n_corr[s], n_arq[s], n_arq_in_replay[s], n_stall[s]);
    end
    chk(n_corr[SCH_CADEC] > 0, "CADEC correction seen");
    chk(n_dbl_corr > 0, "CADEC double-error correction seen");
    chk(n_corr[SCH_DAP] > 0 && n_corr[SCH_BSC] > 0 && n_corr[SCH_MDR] > 0, "SEC corrections seen");
    chk(n_arq[SCH_CADEC] > 0 && n_arq[SCH_ED] > 0, "ARQ seen");
    chk(n_arq_in_replay[SCH_CADEC] + n_arq_in_replay[SCH_ED] > 0, "ARQ during replay seen");
    chk(n_stall[SCH_CADEC] > 0 && n_stall[SCH_ED] > 0, "stall during replay seen");
    chk(n_idle > 0, "idle cycles seen");
    chk(n_fast_arq > 0, "full-rate delivery on ARQ links");
    chk(hpq.size() == 0 && hp_del > 0, "path drained");
    for (int h = 0; h < PATH_HOPS; h++) chk(hdrq[h].size() <= 1, "path: every header decoded at every hop");
    hp_bypass = hp_del * PATH_HOPS - hp_codec_uses;
    chk(hp_codec_uses > 0 && hp_codec_uses <= hp_hdr_sent * PATH_HOPS, "path: hop codecs used for headers");
    chk(hp_bypass >= (hp_pay_sent - 15) * PATH_HOPS && hp_bypass > 0, "path: payload bypassed hop codecs");
    chk(hp_bad_sent > 0 && hp_flags == hp_bad_sent * PATH_HOPS, "path: wrong packet ids flagged at every hop");
    $display("path: headers=%0d payload=%0d delivered=%0d hop-codec-uses=%0d hop-bypasses=%0d wrong-ids=%0d flags=%0d",
             hp_hdr_sent, hp_pay_sent, hp_del, hp_codec_uses, hp_bypass, hp_bad_sent, hp_flags);
    $display("CADEC double corrections=%0d idle=%0d", n_dbl_corr, n_idle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
