// tb_cmp_l2_prefetch_top: end-to-end test of the shared L2 with CZone prefetching, at a
// reduced size (16 sets, 8 TBEs, 64 filter-table rows, 4-entry queues) so that
// evictions, TBE pressure and dropped prefetches happen within a short run.
//
// Four core models issue a unit-stride stream with some stores, a stride-3 stream, a
// descending stride-2 stream and a random stream with stores. A behavioural model
// answers directory requests after 400 cycles. The same workload is run at prefetch
// degrees 0, 1, 2, 4, 8 and 16, with a reset in between, and then with only the first
// core active (one processor per chip, the comparison system) at degrees 0 and 8. Each run checks that every
// request completes with the right address and type, that the controller's counters
// agree with the requests seen off chip, that nothing is prefetched at degree 0, that a
// cold miss takes at least the 400-cycle directory+memory latency, and that all TBEs are
// free at the end. Over all runs each mechanism must have happened at least once: GETS
// misses, prefetches issued and returned, prefetch hits on SP and on ISP lines, drops for
// lack of TBEs and for redundant lines, evictions of unused prefetched lines, write-backs,
// upgrades and demand stalls. Accuracy and coverage are printed per degree.
module tb_cmp_l2_prefetch_top;
  import cmp_pf_pkg::*;
  localparam int SETS = 16, NTBE = 8, LAT = 400, NREQ = 120;
  localparam int CW = 32;

  logic clk = 0, rst_n = 0;
  logic [4:0] degree;
  logic [NCORES-1:0] l1_req_valid, l1_req_ready;
  l1_req_type_e [NCORES-1:0] l1_req_type;
  line_addr_t [NCORES-1:0] l1_req_addr;
  logic l1_rsp_valid, dir_req_valid, dir_req_ready, rsp_in_valid, rsp_in_ready, init_done;
  l1_rsp_t l1_rsp;
  dir_req_t dir_req;
  line_addr_t rsp_in_addr;
  logic [$clog2(NTBE+1)-1:0] tbe_free;
  logic [CW-1:0] n_np_gets, n_isp_gets, n_sp_gets, n_np_prefetch, n_pf_data_ack,
                 n_sp_replace, n_pf_drop_tbe, n_pf_drop_hit, n_demand_stall, n_writeback;
  logic [NCORES-1:0] start;
  logic [NCORES-1:0] active;
  logic [NCORES-1:0] done;
  int d_checks [NCORES], d_fail [NCORES], lat_min [NCORES], lat_max [NCORES];
  int m_gets, m_getx, m_prefetch, m_putx;
  int checks = 0, failures = 0;
  int tot [11];
  string names [11] = '{"GETS miss", "ISP GETS", "SP GETS", "prefetch issued",
                        "prefetch data", "unused prefetch evicted", "drop: TBEs",
                        "drop: present", "demand stall", "write-back", "upgrade/GETX"};

  cmp_l2_prefetch_top #(.L2_SETS(SETS), .NTBE(NTBE), .FT_ENTRIES(64), .Q_DEPTH(4)) dut (
    .clk, .rst_n, .degree, .stats_clear(1'b0),
    .l1_req_valid, .l1_req_type, .l1_req_addr, .l1_req_ready,
    .l1_rsp_valid, .l1_rsp,
    .dir_req_valid, .dir_req, .dir_req_ready,
    .rsp_in_valid, .rsp_in_addr, .rsp_in_ready,
    .init_done, .tbe_free,
    .n_np_gets, .n_isp_gets, .n_sp_gets, .n_np_prefetch, .n_pf_data_ack,
    .n_sp_replace, .n_pf_drop_tbe, .n_pf_drop_hit, .n_demand_stall, .n_writeback
  );

  dir_mem_model #(.LAT(LAT)) u_mem (
    .clk, .rst_n, .req_valid(dir_req_valid), .req(dir_req), .req_ready(dir_req_ready),
    .rsp_valid(rsp_in_valid), .rsp_addr(rsp_in_addr), .rsp_ready(rsp_in_ready),
    .n_gets(m_gets), .n_getx(m_getx), .n_prefetch(m_prefetch), .n_putx(m_putx)
  );

  for (genvar c = 0; c < NCORES; c++) begin : g_core
    l1_stream_driver #(.CORE(c), .PATTERN(c), .NREQ(NREQ)) u_drv (
      .clk, .rst_n, .start(start[c]),
      .req_valid(l1_req_valid[c]), .req_type(l1_req_type[c]), .req_addr(l1_req_addr[c]),
      .req_ready(l1_req_ready[c]), .rsp_valid(l1_rsp_valid), .rsp(l1_rsp),
      .done(done[c]), .checks(d_checks[c]), .failures(d_fail[c]),
      .lat_min(lat_min[c]), .lat_max(lat_max[c])
    );
  end

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static int degrees [6] = '{0, 1, 2, 4, 8, 16};
    int c0 [NCORES], f0 [NCORES];
    foreach (tot[i]) tot[i] = 0;
    foreach (c0[i]) begin c0[i] = 0; f0[i] = 0; end
    start = 0;
    for (int k = 0; k < 8; k++) begin
      int cyc;
      // runs 0-5: all four cores at each degree; runs 6-7: one core per chip (the
      // comparison multiprocessor) at degrees 0 and 8
      degree = (k < 6) ? 5'(degrees[k]) : ((k == 6) ? 5'd0 : 5'd8);
      active = (k < 6) ? '1 : 4'b0001;
      rst_n = 0;
      repeat (3) @(posedge clk);
      rst_n = 1;
      wait (init_done);
      @(negedge clk);
      start = active;
      cyc = 0;
      while ((done & active) != active) begin @(posedge clk); cyc++; end
      @(negedge clk);
      start = 0;
      repeat (LAT + 200) @(posedge clk);   // let outstanding prefetches return
      #1;
      for (int c = 0; c < NCORES; c++) begin
        checks   += d_checks[c] - c0[c];
        failures += d_fail[c] - f0[c];
        c0[c] = d_checks[c]; f0[c] = d_fail[c];
        if (active[c])
          check(lat_max[c] >= LAT, "a cold miss takes at least the directory+memory latency");
      end
      check(n_np_gets == CW'(m_gets), "GETS misses match GETS sent off chip");
      check(n_np_prefetch == CW'(m_prefetch), "prefetches counted match prefetches sent");
      check(n_writeback == CW'(m_putx), "write-backs counted match PUTX sent");
      check(n_pf_data_ack <= n_np_prefetch, "prefetch data never exceeds prefetches");
      check(n_isp_gets + n_sp_gets <= n_np_prefetch, "prefetch hits never exceed prefetches");
      check(int'(tbe_free) == NTBE, "all TBEs free at the end");
      if (degree == 0)
        check(n_np_prefetch == 0 && n_pf_drop_tbe == 0 && n_pf_drop_hit == 0,
              "no prefetching at degree 0");
      else
        check(n_np_prefetch > 0, "prefetches issued");
      tot[0] += int'(n_np_gets);      tot[1] += int'(n_isp_gets);
      tot[2] += int'(n_sp_gets);      tot[3] += int'(n_np_prefetch);
      tot[4] += int'(n_pf_data_ack);  tot[5] += int'(n_sp_replace);
      tot[6] += int'(n_pf_drop_tbe);  tot[7] += int'(n_pf_drop_hit);
      tot[8] += int'(n_demand_stall); tot[9] += int'(n_writeback);
      tot[10] += m_getx;
      $display("%s degree %2d: %0d cycles, GETS miss %0d, ISP hit %0d, SP hit %0d, prefetches %0d, dropped (TBE) %0d, dropped (present) %0d, accuracy %0d%%, coverage %0d%%",
               (k < 6) ? "4 cores" : "1 core ", degree, cyc, n_np_gets, n_isp_gets, n_sp_gets, n_np_prefetch,
               n_pf_drop_tbe, n_pf_drop_hit,
               (n_np_prefetch == 0) ? 0 : 100 * (n_isp_gets + n_sp_gets) / n_np_prefetch,
               100 * (n_isp_gets + n_sp_gets) / (n_isp_gets + n_sp_gets + n_np_gets));
    end
    foreach (tot[i]) begin
      $display("mechanism %-24s happened %0d times", names[i], tot[i]);
      check(tot[i] > 0, {"mechanism never happened: ", names[i]});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
