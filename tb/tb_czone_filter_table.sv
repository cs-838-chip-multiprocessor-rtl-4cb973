// tb_czone_filter_table: self-checking test of the CZone filter table (16-line zones,
// 16 rows). A reference model in the testbench keeps per-zone last address, stride and
// state, and predicts trig and the prefetch address for each miss. Streams with
// positive and negative strides in several zones are interleaved, mixed with random
// misses and with zones that share a row, and every output is compared.
module tb_czone_filter_table;
  import cmp_pf_pkg::*;
  localparam int ZB = 4, E = 16;
  logic clk = 0, rst_n = 0;
  logic miss_valid, trig, stride_match;
  line_addr_t miss_addr, trig_addr;
  logic [LINE_W-1:0] trig_stride;
  int checks = 0, failures = 0, trigs = 0;

  // reference rows
  typedef struct { bit valid; longint ztag; int st; longint stride; longint last; } mrow_t;
  mrow_t m [E];

  czone_filter_table #(.ZONE_BITS(ZB), .ENTRIES(E)) dut (.*);
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

  // one miss through DUT and model
  task automatic miss(longint a);
    longint ztag, off, d;
    int i;
    bit exp_trig;
    longint exp_addr;
    ztag = a >> ZB;
    off  = a & ((1 << ZB) - 1);
    i    = int'(ztag % E);
    exp_trig = 0;
    @(negedge clk);
    miss_valid = 1; miss_addr = line_addr_t'(a);
    #1;
    if (m[i].valid && m[i].ztag == ztag) begin
      d = off - m[i].last;
      if (d != 0 && m[i].st != 0 && d == m[i].stride) begin
        exp_trig = 1;
        exp_addr = a + d;
      end
      if (d != 0) begin
        if (m[i].st == 0) begin m[i].stride = d; m[i].st = 1; end
        else if (d == m[i].stride) m[i].st = 2;
        else begin m[i].stride = d; m[i].st = 1; end
        m[i].last = off;
      end
    end else begin
      m[i] = '{valid: 1, ztag: ztag, st: 0, stride: 0, last: off};
    end
    check(trig == exp_trig, $sformatf("trig for %0h", a));
    if (exp_trig) begin
      trigs++;
      check(trig_addr == line_addr_t'(exp_addr), "prefetch address = miss + stride");
    end
    @(posedge clk); #1 miss_valid = 0;
  endtask

  initial begin
    longint base [4];
    int str [4];
    miss_valid = 0; miss_addr = '0;
    foreach (m[i]) m[i].valid = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // simple: +2 stride in one zone
    miss(64'h500); miss(64'h502);
    check(!trig, "two misses do not trigger");
    miss(64'h504);
    // negative stride
    miss(64'h90f); miss(64'h90c); miss(64'h909); miss(64'h906);
    // interleaved streams in four zones, some sharing rows with each other
    base = '{64'h1000, 64'h2000, 64'h1100, 64'h3400};
    str  = '{1, 3, -1, 2};
    for (int k = 0; k < 4; k++) if (str[k] < 0) base[k] += 15;
    for (int r = 0; r < 5; r++)
      for (int k = 0; k < 4; k++) miss(base[k] + r * str[k]);
    // random misses
    for (int r = 0; r < 3000; r++) begin
      if ($urandom_range(0, 3) == 0) miss(64'($urandom_range(0, 255)) + 64'h7000);
      else begin
        int k = $urandom_range(0, 3);
        miss(64'h8000 + 64'(k * 16) + 64'(($urandom_range(0, 4) * 3) % 16));
      end
    end
    check(trigs > 10, "triggers happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
