// tb_prefetch_addr_gen: self-checking test of the prefetch address generator. For a
// trigger with first address a+s and stride s it expects exactly a+s, a+2s, ..., a+ds,
// one per cycle when the queue always accepts (d cycles for degree d), in order under
// random back-pressure, nothing for degree 0, degree clamped to 16, and a new trigger
// replacing the rest of the previous sequence.
module tb_prefetch_addr_gen;
  import cmp_pf_pkg::*;
  localparam int MD = 16;
  logic clk = 0, rst_n = 0;
  logic [$clog2(MD+1)-1:0] degree;
  logic load, pf_valid, pf_ready, busy;
  line_addr_t first_addr, pf_addr;
  logic [LINE_W-1:0] stride;
  int checks = 0, failures = 0;

  prefetch_addr_gen #(.MAX_DEGREE(MD)) dut (.*);
  always #5 clk = ~clk;

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

  task automatic run(longint a, longint s, int d, bit random_ready);
    int got = 0, cycles = 0;
    @(negedge clk);
    degree = 5'(d); load = 1; first_addr = line_addr_t'(a + s); stride = LINE_W'(s);
    @(posedge clk); #1 load = 0;
    while (got < d && cycles < 200) begin
      @(negedge clk);
      pf_ready = random_ready ? ($urandom_range(0, 1) == 1) : 1'b1;
      #1;
      check(pf_valid, "address offered");
      if (pf_valid && pf_ready) begin
        got++;
        check(pf_addr == line_addr_t'(a + got * s), $sformatf("address %0d of %0d", got, d));
      end
      cycles++;
      @(posedge clk);
    end
    if (!random_ready) check(cycles == d, "one address per cycle");
    @(negedge clk); pf_ready = 1; #1;
    check(!pf_valid && !busy, "sequence ends after degree addresses");
  endtask

  initial begin
    degree = 0; load = 0; first_addr = '0; stride = '0; pf_ready = 1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(1000, 1, 4, 0);
    run(5000, -3, 8, 0);
    run(77, 5, 16, 1);
    run(300, 2, 1, 1);
    // degree 0: nothing
    @(negedge clk); degree = 0; load = 1; first_addr = 10; stride = 1;
    @(posedge clk); #1 load = 0;
    @(negedge clk); check(!pf_valid, "degree 0 issues nothing");
    // degree above 16 is clamped
    @(negedge clk); degree = 5'd20; load = 1; first_addr = 10; stride = 1;
    @(posedge clk); #1 load = 0;
    for (int i = 0; i < 16; i++) begin @(negedge clk); check(pf_valid, "clamped run"); end
    @(negedge clk); check(!pf_valid, "clamped at 16");
    // a new trigger replaces the old sequence
    @(negedge clk); degree = 8; load = 1; first_addr = 100; stride = 1; pf_ready = 0;
    @(posedge clk); #1 load = 0;
    @(negedge clk); degree = 2; load = 1; first_addr = 900; stride = 10;
    @(posedge clk); #1 load = 0; pf_ready = 1;
    @(negedge clk); check(pf_valid && pf_addr == 900, "replaced, first");
    @(posedge clk);
    @(negedge clk); check(pf_valid && pf_addr == 910, "replaced, second");
    @(posedge clk);
    @(negedge clk); check(!pf_valid, "replaced sequence is two long");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
