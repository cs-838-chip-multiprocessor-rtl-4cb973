// tb_czone_prefetcher: self-checking test of the whole CZone prefetcher. A stride-4
// miss stream in one zone must produce, after the third miss, the degree addresses that
// continue the stride, starting in the cycle after the trigger; degree 0 must produce
// none, and random misses spread over many zones must not trigger.
module tb_czone_prefetcher;
  import cmp_pf_pkg::*;
  localparam int MD = 16;
  logic clk = 0, rst_n = 0;
  logic [$clog2(MD+1)-1:0] degree;
  logic miss_valid, pf_valid, pf_ready, trig;
  line_addr_t miss_addr, pf_addr;
  int checks = 0, failures = 0;
  line_addr_t got [$];

  czone_prefetcher #(.ZONE_BITS(10), .ENTRIES(64), .MAX_DEGREE(MD)) dut (.*);
  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n && pf_valid && pf_ready) got.push_back(pf_addr);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic miss(line_addr_t a);
    @(negedge clk); miss_valid = 1; miss_addr = a;
    @(posedge clk); #1 miss_valid = 0;
  endtask

  initial begin
    degree = 4; miss_valid = 0; miss_addr = '0; pf_ready = 1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int d = 0; d <= 8; d += 4) begin
      line_addr_t b;
      b = line_addr_t'(32'h40000 + d * 32'h400);
      degree = 5'(d);
      got.delete();
      miss(b); miss(b + 4);
      @(negedge clk); miss_valid = 1; miss_addr = b + 8; #1;
      check(trig, "third miss of a stride triggers");
      @(posedge clk); #1 miss_valid = 0;
      @(negedge clk);
      if (d > 0) check(pf_valid && pf_addr == b + 12, "first prefetch one cycle after trigger");
      repeat (20) @(posedge clk);
      check(got.size() == d, $sformatf("degree %0d gives %0d prefetches", d, got.size()));
      foreach (got[i]) check(got[i] == b + 8 + 4 * (i + 1), "prefetch address");
    end
    // random misses in distinct zones never trigger
    got.delete();
    degree = 8;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk); miss_valid = 1; miss_addr = line_addr_t'(i) << 10; #1;
      check(!trig, "no trigger on unrelated misses");
      @(posedge clk); #1 miss_valid = 0;
    end
    repeat (5) @(posedge clk);
    check(got.size() == 0, "no prefetches");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
