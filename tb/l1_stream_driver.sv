// l1_stream_driver: behavioural model of one processor and its L1 as seen by the L2:
// it issues NREQ L1-miss requests, one at a time, and checks each completion.
//
// PATTERN selects the address stream (line addresses, in a region of its own per core):
//   0  ascending unit stride, one store (GETX) in eight
//   1  ascending stride of 3 lines
//   2  descending stride of 2 lines
//   3  random lines in the first 256 lines of core 0's region (data shared with the
//      unit-stride stream), a quarter of them stores
// A request is held on req_valid until req_ready; then the driver waits for the
// completion with its core number and checks its address and type. A completion that
// does not arrive within TIMEOUT cycles, or one that does not match, is a failure. The
// driver reports the latency of every request (min and max) and raises done at the end;
// it runs its stream again each time start rises after done.
module l1_stream_driver
  import cmp_pf_pkg::*;
#(
  parameter int CORE    = 0,
  parameter int PATTERN = 0,
  parameter int NREQ    = 100,
  parameter int TIMEOUT = 20000
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  output logic         req_valid,
  output l1_req_type_e req_type,
  output line_addr_t   req_addr,
  input  logic         req_ready,
  input  logic         rsp_valid,
  input  l1_rsp_t      rsp,
  output logic         done,
  output int           checks,
  output int           failures,
  output int           lat_min,
  output int           lat_max
);
  function automatic line_addr_t addr_of(int i);
    longint base;
    base = 64'h100000 * 64'(CORE + 1);
    case (PATTERN)
      0: return line_addr_t'(base + 64'(i));
      1: return line_addr_t'(base + 64'(3 * i));
      2: return line_addr_t'(base + 64'hffff - 64'(2 * i));
      default: return line_addr_t'(64'h100000 + 64'($urandom_range(0, 255)));
    endcase
  endfunction

  function automatic l1_req_type_e type_of(int i);
    case (PATTERN)
      0: return (i % 8 == 7) ? REQ_GETX : REQ_GETS;
      3: return ($urandom_range(0, 3) == 0) ? REQ_GETX : REQ_GETS;
      default: return REQ_GETS;
    endcase
  endfunction

  initial begin
    req_valid = 0; req_type = REQ_GETS; req_addr = '0; done = 0;
    checks = 0; failures = 0; lat_min = 1 << 30; lat_max = 0;
    forever begin
    wait (rst_n && start);
    lat_min = 1 << 30; lat_max = 0;
    for (int i = 0; i < NREQ; i++) begin
      int t;
      bit got;
      @(negedge clk);
      req_valid = 1; req_type = type_of(i); req_addr = addr_of(i);
      t = 0;
      do begin @(posedge clk); t++; end while (!req_ready);
      #1 req_valid = 0;
      got = 0;
      while (!got && t < TIMEOUT) begin
        @(posedge clk); t++;
        if (rsp_valid && rsp.core == core_id_t'(CORE)) begin
          got = 1;
          checks++;
          if (rsp.addr != req_addr || rsp.rtype != req_type) begin
            failures++;
            $display("FAIL core %0d: completion %0h, expected %0h", CORE, rsp.addr, req_addr);
          end
        end
      end
      checks++;
      if (!got) begin
        failures++;
        $display("FAIL core %0d: no completion for %0h", CORE, req_addr);
      end
      if (t < lat_min) lat_min = t;
      if (t > lat_max) lat_max = t;
      // think time between requests
      repeat ($urandom_range(0, 20)) @(posedge clk);
    end
    done = 1;
    wait (!start);
    done = 0;
    end
  end
endmodule
