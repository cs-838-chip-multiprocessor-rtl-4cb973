// tb_cmp_full_size: the shared L2 with CZone prefetching at its full configuration
// (4 MB, 4-way, 16384 sets, 64 TBEs, 1024-row filter table, degree up to 16), run end to
// end at prefetch degree 8.
//
// After the 16384-cycle tag-array clear, four core models run a unit-stride stream with
// stores, a stride-3 stream, a descending stride-2 stream and a random stream over the
// first stream's lines, 100 requests each, against a 400-cycle directory+memory model.
// Checked: every request completes with the right address and type, prefetches are
// issued and hit (on SP and ISP lines), the counters agree with the traffic seen off
// chip, a cold miss takes at least 400 cycles, and every TBE is free at the end.
module tb_cmp_full_size;
  import cmp_pf_pkg::*;
  localparam int NTBE = 64, LAT = 400, NREQ = 100, CW = 32;

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
  logic start;
  logic [NCORES-1:0] done;
  int d_checks [NCORES], d_fail [NCORES], lat_min [NCORES], lat_max [NCORES];
  int m_gets, m_getx, m_prefetch, m_putx;
  int checks = 0, failures = 0;

  cmp_l2_prefetch_top dut (
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
      .clk, .rst_n, .start,
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
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    degree = 5'd8;
    start = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    cyc = 0;
    while (!init_done) begin @(posedge clk); cyc++; end
    check(cyc >= 16384, "tag array cleared over 16384 cycles");
    @(negedge clk);
    check(int'(tbe_free) == NTBE, "64 TBEs free");
    start = 1;
    cyc = 0;
    while (done != '1) begin @(posedge clk); cyc++; end
    @(negedge clk);
    start = 0;
    repeat (LAT + 200) @(posedge clk);
    #1;
    for (int c = 0; c < NCORES; c++) begin
      checks   += d_checks[c];
      failures += d_fail[c];
      check(d_checks[c] >= 2 * NREQ, "every request of the core was checked");
      check(lat_max[c] >= LAT, "a cold miss takes at least the directory+memory latency");
    end
    check(n_np_gets == CW'(m_gets), "GETS misses match GETS sent off chip");
    check(n_np_prefetch == CW'(m_prefetch), "prefetches counted match prefetches sent");
    check(n_np_prefetch > 0, "prefetches issued");
    check(n_sp_gets > 0 && n_isp_gets > 0, "prefetch hits on SP and ISP lines");
    check(n_pf_data_ack <= n_np_prefetch, "prefetch data never exceeds prefetches");
    check(int'(tbe_free) == NTBE, "all TBEs free at the end");
    $display("degree 8, full size: %0d cycles, GETS miss %0d, ISP hit %0d, SP hit %0d, prefetches %0d, dropped (TBE) %0d, dropped (present) %0d",
             cyc, n_np_gets, n_isp_gets, n_sp_gets, n_np_prefetch, n_pf_drop_tbe, n_pf_drop_hit);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
