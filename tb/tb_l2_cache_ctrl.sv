// tb_l2_cache_ctrl: directed, self-checking test of the L2 controller (8 sets, 4 ways,
// 8 TBEs). The three input queues are modelled in the testbench; every request sent
// towards the directory, every completion and every address passed to the prefetcher is
// logged and compared with the expected sequence. Covered: demand miss and fill, hit
// (two-cycle service), prefetch issue and data return (NP->ISP->SP), prefetch hit
// (<SP>GETS), a demand joining an in-flight prefetch (<ISP>GETS), redundant prefetch
// drop, GETX miss, upgrade of S and of SP, write-back of a modified victim, eviction of an unused
// prefetched line, the more-than-half-free TBE rule for prefetches, and a demand stall
// on full TBEs.
module tb_l2_cache_ctrl;
  import cmp_pf_pkg::*;
  localparam int SETS = 8, WAYS = 4, NTBE = 8;
  logic clk = 0, rst_n = 0;
  logic l1q_valid, l1q_pop, pfq_valid, pfq_pop, rsp_valid, rsp_pop;
  l1_req_t l1q_req;
  line_addr_t pfq_addr, rsp_addr, miss_addr;
  logic dir_push, dir_ready, l1_rsp_valid, miss_valid, init_done;
  dir_req_t dir_req;
  l1_rsp_t l1_rsp;
  l2_events_t ev;
  logic [$clog2(NTBE+1)-1:0] tbe_free;
  int checks = 0, failures = 0;
  int cyc = 0;

  l1_req_t    q_l1 [$];
  line_addr_t q_pf [$], q_rsp [$];
  dir_req_t   log_dir [$];
  l1_rsp_t    log_rsp [$];
  int         log_rsp_cyc [$];
  line_addr_t log_miss [$];
  int n_ev [10];

  l2_cache_ctrl #(.SETS(SETS), .WAYS(WAYS), .NTBE(NTBE)) dut (.*);
  always #5 clk = ~clk;

  assign l1q_valid = q_l1.size() != 0;
  assign l1q_req   = (q_l1.size() != 0) ? q_l1[0] : '0;
  assign pfq_valid = q_pf.size() != 0;
  assign pfq_addr  = (q_pf.size() != 0) ? q_pf[0] : '0;
  assign rsp_valid = q_rsp.size() != 0;
  assign rsp_addr  = (q_rsp.size() != 0) ? q_rsp[0] : '0;
  assign dir_ready = 1'b1;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (l1q_pop) void'(q_l1.pop_front());
      if (pfq_pop) void'(q_pf.pop_front());
      if (rsp_pop) void'(q_rsp.pop_front());
      if (dir_push) log_dir.push_back(dir_req);
      if (l1_rsp_valid) begin log_rsp.push_back(l1_rsp); log_rsp_cyc.push_back(cyc); end
      if (miss_valid) log_miss.push_back(miss_addr);
      n_ev[0] += int'(ev.np_gets);     n_ev[1] += int'(ev.isp_gets);
      n_ev[2] += int'(ev.sp_gets);     n_ev[3] += int'(ev.np_prefetch);
      n_ev[4] += int'(ev.pf_data_ack); n_ev[5] += int'(ev.sp_replace);
      n_ev[6] += int'(ev.pf_drop_tbe); n_ev[7] += int'(ev.pf_drop_hit);
      n_ev[8] += int'(ev.demand_stall); n_ev[9] += int'(ev.writeback);
    end
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (cycle %0d)", what, cyc); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic gets(int core, line_addr_t a);
    q_l1.push_back('{core: core_id_t'(core), rtype: REQ_GETS, addr: a});
  endtask
  task automatic getx(int core, line_addr_t a);
    q_l1.push_back('{core: core_id_t'(core), rtype: REQ_GETX, addr: a});
  endtask
  task automatic settle();
    repeat (12) @(posedge clk);
    #1;
  endtask
  task automatic exp_dir(dir_req_type_e t, line_addr_t a);
    check(log_dir.size() > 0, $sformatf("directory request %s %0h expected", t.name(), a));
    if (log_dir.size() > 0) begin
      dir_req_t r = log_dir.pop_front();
      check(r.rtype == t && r.addr == a,
            $sformatf("directory request %s %0h, got %s %0h", t.name(), a, r.rtype.name(), r.addr));
    end
  endtask
  task automatic exp_rsp(int core, l1_req_type_e t, line_addr_t a);
    check(log_rsp.size() > 0, $sformatf("completion for %0h expected", a));
    if (log_rsp.size() > 0) begin
      l1_rsp_t r = log_rsp.pop_front();
      void'(log_rsp_cyc.pop_front());
      check(r.core == core_id_t'(core) && r.rtype == t && r.addr == a,
            $sformatf("completion core %0d %0h", core, a));
    end
  endtask
  task automatic exp_miss(line_addr_t a);
    check(log_miss.size() > 0 && log_miss[0] == a, $sformatf("miss address %0h to prefetcher", a));
    if (log_miss.size() > 0) void'(log_miss.pop_front());
  endtask
  task automatic exp_quiet(string what);
    check(log_dir.size() == 0, {what, ": no directory request"});
    check(log_rsp.size() == 0, {what, ": no completion"});
    check(log_miss.size() == 0, {what, ": no miss address"});
    log_dir.delete(); log_rsp.delete(); log_rsp_cyc.delete(); log_miss.delete();
  endtask
  task automatic exp_ev(int i, int n, string what);
    check(n_ev[i] == n, $sformatf("%s count %0d, expected %0d", what, n_ev[i], n));
  endtask

  localparam line_addr_t A = 'h100, B = 'h200, C = 'h300, D = 'h401;
  localparam line_addr_t P1 = 'h102;

  initial begin
    int t0;
    foreach (n_ev[i]) n_ev[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    wait (init_done);
    @(negedge clk);
    check(tbe_free == NTBE, "all TBEs free after reset");

    // demand miss, fill, hit
    gets(1, A); settle();
    exp_dir(DIR_GETS, A); exp_miss(A); exp_ev(0, 1, "np_gets");
    check(log_rsp.size() == 0, "no completion before the data");
    check(tbe_free == NTBE - 1, "one TBE in use");
    q_rsp.push_back(A); settle();
    exp_rsp(1, REQ_GETS, A); exp_quiet("fill");
    check(tbe_free == NTBE, "TBE released on fill");
    @(negedge clk); t0 = cyc; gets(2, A); settle();
    check(log_rsp_cyc.size() > 0 && log_rsp_cyc[0] - t0 <= 2, "hit served in two cycles");
    exp_rsp(2, REQ_GETS, A); exp_quiet("hit");

    // prefetch, data, prefetch hit
    q_pf.push_back(B); settle();
    exp_dir(DIR_PREFETCH, B); exp_ev(3, 1, "np_prefetch"); exp_quiet("prefetch");
    q_rsp.push_back(B); settle();
    exp_ev(4, 1, "pf_data_ack"); exp_quiet("prefetch data");
    gets(3, B); settle();
    exp_rsp(3, REQ_GETS, B); exp_miss(B); exp_ev(2, 1, "sp_gets"); exp_quiet("prefetch hit");
    gets(3, B); settle();
    exp_rsp(3, REQ_GETS, B); exp_quiet("second access is a plain hit");
    exp_ev(2, 1, "sp_gets");

    // demand joins an in-flight prefetch
    q_pf.push_back(C); settle();
    exp_dir(DIR_PREFETCH, C);
    gets(0, C); settle();
    exp_miss(C); exp_ev(1, 1, "isp_gets"); exp_quiet("join");
    q_rsp.push_back(C); settle();
    exp_rsp(0, REQ_GETS, C); exp_quiet("joined fill");
    exp_ev(4, 1, "no PrefetchDataAck for a joined prefetch");

    // redundant prefetch
    q_pf.push_back(A); settle();
    exp_ev(7, 1, "pf_drop_hit"); exp_quiet("redundant prefetch");

    // GETX on a prefetched line: upgrade, not reported to the prefetcher, not a prefetch hit
    q_pf.push_back('h305); settle(); exp_dir(DIR_PREFETCH, 'h305);
    q_rsp.push_back('h305); settle(); exp_quiet("prefetch data");
    getx(2, 'h305); settle();
    exp_dir(DIR_GETX, 'h305); exp_quiet("SP upgrade");
    exp_ev(2, 1, "sp_gets unchanged by GETX");
    q_rsp.push_back('h305); settle();
    exp_rsp(2, REQ_GETX, 'h305); exp_quiet("SP upgrade fill");

    // GETX miss, M hit, upgrade of S
    getx(1, D); settle();
    exp_dir(DIR_GETX, D); exp_quiet("getx miss: not sent to prefetcher");
    q_rsp.push_back(D); settle();
    exp_rsp(1, REQ_GETX, D); exp_quiet("getx fill");
    getx(2, D); settle();
    exp_rsp(2, REQ_GETX, D); exp_quiet("M hit");
    getx(0, A); settle();
    exp_dir(DIR_GETX, A); exp_quiet("upgrade");
    q_rsp.push_back(A); settle();
    exp_rsp(0, REQ_GETX, A); exp_quiet("upgrade fill");

    // write-back: set 1 holds D (M) in way 0; three more lines fill ways 1-3 and the
    // fourth evicts way 0
    for (int i = 0; i < 4; i++) begin
      line_addr_t e;
      e = line_addr_t'('h501 + i * 'h100);
      gets(1, e); settle();
      if (i == 3) begin exp_dir(DIR_PUTX, D); exp_ev(9, 1, "writeback"); end
      exp_dir(DIR_GETS, e); exp_miss(e);
      q_rsp.push_back(e); settle();
      exp_rsp(1, REQ_GETS, e); exp_quiet("set 1 fill");
    end

    // unused prefetched line evicted: P1 in way 0 of set 2, then four demand lines
    q_pf.push_back(P1); settle(); exp_dir(DIR_PREFETCH, P1);
    q_rsp.push_back(P1); settle(); exp_quiet("P1");
    for (int i = 0; i < 4; i++) begin
      line_addr_t f;
      f = line_addr_t'('h202 + i * 'h100);
      gets(2, f); settle();
      exp_dir(DIR_GETS, f); exp_miss(f);
      q_rsp.push_back(f); settle();
      exp_rsp(2, REQ_GETS, f); exp_quiet("set 2 fill");
    end
    exp_ev(5, 1, "sp_replace");

    // TBE rule: four outstanding misses leave exactly half free: prefetch dropped
    for (int i = 0; i < 4; i++) gets(i, line_addr_t'('h1003 + i * 9));
    settle();
    check(tbe_free == 4, "four TBEs in use");
    q_pf.push_back('h7777); settle();
    exp_ev(6, 1, "pf_drop_tbe");
    check(log_dir.size() == 4, "only the demand misses went off chip");
    // fill the rest, then one more demand must wait for a free TBE
    for (int i = 4; i < 9; i++) gets(i % 4, line_addr_t'('h1003 + i * 9));
    settle();
    check(tbe_free == 0, "TBEs full");
    check(n_ev[8] > 0, "demand stalled on full TBEs");
    check(q_l1.size() == 1, "the ninth miss waits in its queue");
    check(log_dir.size() == 8, "eight misses outstanding");
    for (int i = 0; i < 9; i++) begin
      q_rsp.push_back(line_addr_t'('h1003 + i * 9));
      settle();
    end
    for (int i = 0; i < 9; i++) exp_dir(DIR_GETS, line_addr_t'('h1003 + i * 9));
    for (int i = 0; i < 9; i++) exp_rsp(i % 4, REQ_GETS, line_addr_t'('h1003 + i * 9));
    check(tbe_free == NTBE, "all TBEs free again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
