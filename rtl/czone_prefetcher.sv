// czone_prefetcher: the CZone stride prefetcher that sits beside the shared L2.
//
// It watches the L2's miss address stream (demand GETS misses, plus demand GETS hits on
// lines that are still marked as prefetched, which the L2 reports as if they had missed).
// Each address goes through the CZone filter table; when the table confirms a stride the
// address generator issues degree prefetch addresses, one per cycle, towards the
// prefetch request queue (pf_valid/pf_addr/pf_ready). miss_valid is accepted every cycle;
// a trigger seen in cycle t produces its first prefetch address in cycle t+1. The
// structure (filter table feeding prefetch requests to the L2) follows the source report; the
// sizes are set by the parameters below.
module czone_prefetcher
  import cmp_pf_pkg::*;
#(
  parameter int unsigned ZONE_BITS  = 10,
  parameter int unsigned ENTRIES    = 1024,
  parameter int unsigned MAX_DEGREE = 16
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic [$clog2(MAX_DEGREE+1)-1:0] degree,
  input  logic                            miss_valid,
  input  line_addr_t                      miss_addr,
  output logic                            pf_valid,
  output line_addr_t                      pf_addr,
  input  logic                            pf_ready,
  output logic                            trig
);
  line_addr_t        trig_addr;
  logic [LINE_W-1:0] trig_stride;

  czone_filter_table #(.ZONE_BITS(ZONE_BITS), .ENTRIES(ENTRIES)) u_ft (
    .clk, .rst_n, .miss_valid, .miss_addr,
    .trig, .trig_addr, .trig_stride, .stride_match()
  );

  prefetch_addr_gen #(.MAX_DEGREE(MAX_DEGREE)) u_gen (
    .clk, .rst_n, .degree,
    .load(trig), .first_addr(trig_addr), .stride(trig_stride),
    .pf_valid, .pf_addr, .pf_ready, .busy()
  );
endmodule
