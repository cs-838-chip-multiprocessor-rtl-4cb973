// tb_prefetch_stats: self-checking test of the prefetch event counters. Random event
// pulses are counted by the testbench as well; all ten counters are compared, then the
// clear input is checked, and saturation is checked with a 4-bit counter instance.
module tb_prefetch_stats;
  import cmp_pf_pkg::*;
  localparam int CW = 32;
  logic clk = 0, rst_n = 0, clear = 0, clear4 = 0;
  l2_events_t ev;
  logic [CW-1:0] n [10];
  logic [3:0] s [10];
  int exp [10];
  int checks = 0, failures = 0;

  prefetch_stats #(.CNT_W(CW)) dut (.clk, .rst_n, .clear, .ev,
    .n_np_gets(n[0]), .n_isp_gets(n[1]), .n_sp_gets(n[2]), .n_np_prefetch(n[3]),
    .n_pf_data_ack(n[4]), .n_sp_replace(n[5]), .n_pf_drop_tbe(n[6]), .n_pf_drop_hit(n[7]),
    .n_demand_stall(n[8]), .n_writeback(n[9]));
  prefetch_stats #(.CNT_W(4)) dut4 (.clk, .rst_n, .clear(clear4), .ev,
    .n_np_gets(s[0]), .n_isp_gets(s[1]), .n_sp_gets(s[2]), .n_np_prefetch(s[3]),
    .n_pf_data_ack(s[4]), .n_sp_replace(s[5]), .n_pf_drop_tbe(s[6]), .n_pf_drop_hit(s[7]),
    .n_demand_stall(s[8]), .n_writeback(s[9]));
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [9:0] bits;
    ev = '0;
    foreach (exp[i]) exp[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 500; c++) begin
      @(negedge clk);
      bits = 10'($urandom);
      ev = l2_events_t'(bits);
      // struct field order: np_gets is the most significant bit
      for (int i = 0; i < 10; i++) if (bits[9 - i]) exp[i]++;
    end
    @(negedge clk); ev = '0;
    @(negedge clk);
    for (int i = 0; i < 10; i++) begin
      check(n[i] == CW'(exp[i]), $sformatf("counter %0d", i));
      check(s[i] == 4'hf, $sformatf("4-bit counter %0d saturates", i));
    end
    clear = 1; @(negedge clk); clear = 0;
    for (int i = 0; i < 10; i++) check(n[i] == '0, "cleared");
    check(s[0] == 4'hf, "other instance not cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
