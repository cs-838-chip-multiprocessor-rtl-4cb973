// tb_l1_req_arbiter: self-checking test of the round-robin L1 request arbiter. Four
// requesters raise requests at random and hold them until granted. Each grant is checked
// against an independently computed round-robin winner, the forwarded fields against the
// winner's request, and every request must be granted within four grants.
module tb_l1_req_arbiter;
  import cmp_pf_pkg::*;
  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] req_valid, req_ready;
  l1_req_type_e [N-1:0] req_type;
  line_addr_t [N-1:0] req_addr;
  logic out_valid, out_ready;
  l1_req_t out_req;
  int checks = 0, failures = 0;
  int last = N - 1;
  int wait_grants [N];

  l1_req_arbiter #(.NREQ(N)) dut (.*);
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
    int exp;
    req_valid = '0; out_ready = 0;
    for (int i = 0; i < N; i++) begin
      req_type[i] = REQ_GETS; req_addr[i] = '0; wait_grants[i] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 4000; c++) begin
      @(negedge clk);
      for (int i = 0; i < N; i++) begin
        if (!req_valid[i] && $urandom_range(0, 3) == 0) begin
          req_valid[i] = 1'b1;
          req_type[i]  = l1_req_type_e'($urandom_range(0, 1));
          req_addr[i]  = line_addr_t'({$urandom, $urandom});
        end
      end
      out_ready = ($urandom_range(0, 4) != 0);
      #1;
      exp = -1;
      for (int k = 1; k <= N; k++) begin
        if (exp < 0 && req_valid[(last + k) % N]) exp = (last + k) % N;
      end
      if (exp >= 0 && out_ready) begin
        check(out_valid, "grant expected");
        check(req_ready == (N'(1) << exp), "one-hot ready to the round-robin winner");
        check(out_req.core == core_id_t'(exp), "core tag");
        check(out_req.addr == req_addr[exp] && out_req.rtype == req_type[exp], "fields");
      end else begin
        check(!out_valid && req_ready == '0, "no grant");
      end
      @(posedge clk);
      #1;
      if (exp >= 0 && out_ready) begin
        for (int i = 0; i < N; i++)
          if (req_valid[i] && i != exp) wait_grants[i]++;
        check(wait_grants[exp] < N, "granted within N grants");
        wait_grants[exp] = 0;
        req_valid[exp] = 1'b0;
        last = exp;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
