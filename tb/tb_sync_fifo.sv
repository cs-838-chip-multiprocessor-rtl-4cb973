// tb_sync_fifo: self-checking test of sync_fifo (DEPTH 4). Random pushes and pops are
// compared against a reference queue; the test checks ordering, the full and empty
// flags, the occupancy count, and push+pop on a full queue.
module tb_sync_fifo;
  localparam int W = 16, D = 4;
  logic clk = 0, rst_n = 0;
  logic wr_push, wr_ready, rd_valid, rd_pop;
  logic [W-1:0] wr_data, rd_data;
  logic [$clog2(D+1)-1:0] count;
  int checks = 0, failures = 0;
  logic [W-1:0] model [$];
  int full_seen = 0, both_on_full = 0;

  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);
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
    wr_push = 0; rd_pop = 0; wr_data = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      check(rd_valid == (model.size() != 0), "rd_valid");
      check(count == model.size(), "count");
      check(wr_ready == (model.size() < D), "wr_ready when not popping");
      if (model.size() != 0) check(rd_data == model[0], "head data");
      rd_pop  = rd_valid && ($urandom_range(0, 2) != 0);
      wr_data = W'($urandom);
      wr_push = ($urandom_range(0, 2) != 0) && (wr_ready || rd_pop);
      if (model.size() == D) full_seen++;
      if (model.size() == D && rd_pop && wr_push) both_on_full++;
      @(posedge clk);
      #1;
      if (rd_pop) void'(model.pop_front());
      if (wr_push) model.push_back(wr_data);
      rd_pop = 0; wr_push = 0;
    end
    check(full_seen > 0, "queue became full");
    check(both_on_full > 0, "push and pop on a full queue");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
