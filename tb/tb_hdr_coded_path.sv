// tb_hdr_coded_path -- self-checking test of hdr_coded_path and
// hdr_hop_codec (FPC code, three hops).
//
// Packets of a header plus 0..20 payload flits (packet id in bits 3:0 of
// every flit, count in header bits 8:4), with random idle cycles, are sent;
// about one payload flit in twelve carries a wrong packet id. Checks: every
// flit arrives unchanged, in order, exactly HOPS+2 cycles after it entered;
// every hop decodes exactly the headers, in order, and no payload flit; the
// codec of a hop is used once per header only; a payload flit passes each hop
// with its coded word untouched; each hop flags exactly the payload flits
// with a wrong packet id, as they leave it.
module tb_hdr_coded_path;
  import noc_code_pkg::*;
  localparam int HOPS = 3;

  logic                        clk = 0, rst_n = 0;
  logic                        in_valid, out_valid;
  logic [31:0]                 in_data, out_data;
  logic [HOPS-1:0]             hv, used, pm;
  logic [HOPS-1:0][31:0]       hd;
  int checks = 0, failures = 0, cyc = 0;
  int n_hdr = 0, n_pay = 0, n_used = 0, n_zero_len = 0;
  typedef struct { logic [31:0] d; int t; } ent_t;
  ent_t q [$];
  logic [31:0] hq [HOPS][$];
  bit          bq [HOPS][$];     // per hop: does the next flit carry a wrong id
  int n_bad = 0, n_flagged = 0;

  always #5 clk = ~clk;

  hdr_coded_path #(.SCHEME(SCH_FPC), .HOPS(HOPS)) dut (
    .clk, .rst_n, .in_valid, .in_data, .out_valid, .out_data,
    .hop_hdr_valid(hv), .hop_hdr_data(hd), .hop_codec_used(used),
    .hop_pid_mismatch(pm));

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s cyc=%0d", what, cyc);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [HOPS-1:0][54:0] prev_w;
  int n_pay_pass = 0;

  always @(posedge clk) if (rst_n) begin
    ent_t e;
    for (int h = 0; h < HOPS; h++) begin
      if (dut.v[h+1] && !used[h]) begin
        chk(dut.w[h+1] == prev_w[h], "payload passes hop still coded and untouched");
        n_pay_pass++;
      end
      prev_w[h] = dut.w[h];
    end
    cyc++;
    if (in_valid) q.push_back('{d: in_data, t: cyc});
    if (out_valid) begin
      chk(q.size() > 0, "unexpected flit");
      if (q.size() > 0) begin
        e = q.pop_front();
        chk(out_data == e.d, "data");
        chk(cyc - e.t == HOPS + 2, "latency");
      end
    end
    for (int h = 0; h < HOPS; h++) begin
      if (dut.v[h+1]) begin
        chk(bq[h].size() > 0, "hop flit accounted");
        if (bq[h].size() > 0) chk(pm[h] == bq[h].pop_front(), "packet id mismatch flag");
      end else chk(!pm[h], "no mismatch flag without a flit");
      if (pm[h]) n_flagged++;
      if (used[h]) n_used++;
      if (hv[h]) begin
        chk(hq[h].size() > 0 && hq[h][0] == hd[h], "hop header");
        if (hq[h].size() > 0) void'(hq[h].pop_front());
      end
    end
  end

  initial begin
    in_valid = 0; in_data = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int p = 0; p < 300; p++) begin
      int len;
      logic [31:0] hdr;
      logic [3:0]  pid;
      bit          bad;
      len = (p % 10 == 0) ? 0 : (p % 3 == 0) ? 15 : $urandom_range(20, 1);
      if (len == 0) n_zero_len++;
      pid = 4'($urandom);
      hdr = {23'($urandom), 5'(len), pid};
      for (int h = 0; h < HOPS; h++) hq[h].push_back(hdr);
      for (int f = 0; f <= len; f++) begin
        while ($urandom_range(3, 0) == 0) begin
          @(negedge clk); in_valid = 0;
        end
        @(negedge clk);
        in_valid = 1;
        bad = (f != 0) && ($urandom_range(11, 0) == 0);
        if (bad) n_bad++;
        in_data  = (f == 0) ? hdr : {28'($urandom), bad ? pid ^ 4'($urandom_range(15, 1)) : pid};
        for (int h = 0; h < HOPS; h++) bq[h].push_back(bad);
        if (f == 0) n_hdr++; else n_pay++;
      end
    end
    @(negedge clk); in_valid = 0;
    repeat (HOPS + 5) @(posedge clk);
    chk(q.size() == 0, "drained");
    for (int h = 0; h < HOPS; h++) chk(hq[h].size() == 0, "all headers seen");
    chk(n_used == n_hdr * HOPS, "codec used only for headers");
    chk(n_zero_len > 0, "header-only packets");
    chk(n_bad > 0 && n_flagged == n_bad * HOPS, "every wrong packet id flagged at every hop");
    chk(n_pay_pass == n_pay * HOPS, "every payload flit bypassed every hop codec");
    $display("headers=%0d payload=%0d hop-codec-uses=%0d wrong-ids=%0d flags=%0d",
             n_hdr, n_pay, n_used, n_bad, n_flagged);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
