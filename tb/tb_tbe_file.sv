// tb_tbe_file: self-checking test of the TBE file with 8 entries. It fills all entries
// with distinct addresses, checks the associative lookup of each, the free count, the
// full flag and the prefetch permission (more than half free), joins a demand request
// to a prefetch entry, frees entries in random order and reallocates the lowest free one.
module tb_tbe_file;
  import cmp_pf_pkg::*;
  localparam int N = 8;
  localparam int IW = $clog2(N);
  logic clk = 0, rst_n = 0;
  line_addr_t lookup_addr;
  logic lookup_hit, alloc, free, join_req, full, pf_allowed;
  logic [IW-1:0] lookup_idx, alloc_idx, free_idx, join_idx;
  tbe_t lookup_entry, alloc_entry;
  core_id_t join_core;
  l1_req_type_e join_type;
  logic [$clog2(N+1)-1:0] free_count;
  int checks = 0, failures = 0;
  line_addr_t addrs [N];
  bit used [N];

  tbe_file #(.NTBE(N)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic int nfree();
    int f = 0;
    foreach (used[i]) if (!used[i]) f++;
    return f;
  endfunction

  function automatic int lowest_free();
    for (int i = 0; i < N; i++) if (!used[i]) return i;
    return -1;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_state();
    #1;
    check(free_count == nfree(), "free count");
    check(full == (nfree() == 0), "full");
    check(pf_allowed == (nfree() > N / 2), "prefetch allowed only when more than half free");
    for (int i = 0; i < N; i++) begin
      lookup_addr = addrs[i];
      #1;
      check(lookup_hit == used[i], "lookup hit");
      if (used[i]) check(lookup_entry.addr == addrs[i], "lookup entry");
    end
  endtask

  initial begin
    int victim;
    alloc = 0; free = 0; join_req = 0; lookup_addr = '0; alloc_entry = '0;
    free_idx = '0; join_idx = '0; join_core = '0; join_type = REQ_GETS;
    foreach (used[i]) begin used[i] = 0; addrs[i] = line_addr_t'(32'h1000 + i * 37); end
    repeat (2) @(posedge clk);
    rst_n = 1;
    // allocate all: entries are filled lowest-first, so entry i holds addrs[i]
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      check_state();
      check(alloc_idx == IW'(lowest_free()), "lowest free allocated");
      alloc = 1;
      alloc_entry = '{addr: addrs[i], prefetch: (i % 2 == 1), core: core_id_t'(i), rtype: REQ_GETS};
      @(posedge clk); #1 alloc = 0;
      used[i] = 1;
    end
    @(negedge clk);
    check_state();
    // join a demand to entry 3 (a prefetch entry)
    lookup_addr = addrs[3]; #1;
    check(lookup_entry.prefetch, "entry 3 is a prefetch");
    join_req = 1; join_idx = lookup_idx; join_core = 2'd2; join_type = REQ_GETS;
    @(posedge clk); #1 join_req = 0;
    lookup_addr = addrs[3]; #1;
    check(!lookup_entry.prefetch && lookup_entry.core == 2'd2, "join recorded");
    // free in random order, reallocating now and then
    for (int k = 0; k < 40; k++) begin
      @(negedge clk);
      if ($urandom_range(0, 1) == 0 && nfree() < N) begin
        do victim = $urandom_range(0, N - 1); while (!used[victim]);
        free = 1; free_idx = IW'(victim);
        @(posedge clk); #1 free = 0;
        used[victim] = 0;
      end else if (nfree() > 0) begin
        victim = lowest_free();
        check(alloc_idx == IW'(victim), "realloc lowest free");
        addrs[victim] = line_addr_t'($urandom);
        alloc = 1;
        alloc_entry = '{addr: addrs[victim], prefetch: 1'b0, core: '0, rtype: REQ_GETX};
        @(posedge clk); #1 alloc = 0;
        used[victim] = 1;
      end
      @(negedge clk);
      check_state();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
