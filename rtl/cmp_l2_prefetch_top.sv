// cmp_l2_prefetch_top: the shared second-level cache of one chip multiprocessor, with a
// CZone stride prefetcher working on its miss address stream.
//
// Four processors, each with a private L1, share this L2. L1 requests (GETS for loads and
// instruction fetches, GETX for stores) are merged by a round-robin arbiter into the
// L1-to-L2 request queue. The L2 controller serves them from its tag/state array and
// sends misses towards the home directory through the L2-to-directory request queue; the
// data for those requests comes back through the response queue. Every GETS miss, and
// every GETS that finds a line still marked as prefetched (SP or ISP), is passed to the
// CZone prefetcher, whose filter table looks for a constant stride within each zone of
// memory and then issues `degree` prefetch addresses into the prefetch request queue. The
// L2 turns a prefetch into an off-chip PREFETCH only if the line is absent and more than
// half of the 64 transaction buffer entries are free; otherwise it drops it. Event
// counters give the numbers behind prefetch accuracy and coverage.
//
// Interface: l1_req_* is one valid/ready request port per core; l1_rsp_* reports each
// completed L1 request (hit, or fill of a miss) for one cycle; dir_req_* is the head of
// the outgoing queue (valid/ready); rsp_in_* accepts returned data, by line address,
// into the response queue (valid/ready). degree (0 to 16, 0 = off) may change at any
// time and applies from the next trigger. After reset the L2 clears its tag array for
// L2_SETS cycles; init_done rises when requests are served. Line data is not carried.
//
// The scheme is the one of the course report "CS 838 - Chip Multiprocessor Prefetching"
// (the source report in the comments of these files). The structure (queues, L2,
// prefetcher, the places they connect) follows its chip diagram, and the sizes its
// 4 MB / 4-way / 64-byte / 64-TBE configuration; queue depths and the CZone and
// filter-table sizes are this design's choice.
module cmp_l2_prefetch_top
  import cmp_pf_pkg::*;
#(
  parameter int unsigned L2_SETS    = 16384,  // 4 MB / (4 ways * 64 B)
  parameter int unsigned L2_WAYS    = 4,
  parameter int unsigned NTBE       = 64,
  parameter int unsigned ZONE_BITS  = 10,     // 64 KB CZones
  parameter int unsigned FT_ENTRIES = 1024,
  parameter int unsigned MAX_DEGREE = 16,
  parameter int unsigned Q_DEPTH    = 8,
  parameter int unsigned CNT_W      = 32
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic [$clog2(MAX_DEGREE+1)-1:0] degree,
  input  logic                            stats_clear,
  // L1 request ports
  input  logic         [NCORES-1:0]       l1_req_valid,
  input  l1_req_type_e [NCORES-1:0]       l1_req_type,
  input  line_addr_t   [NCORES-1:0]       l1_req_addr,
  output logic         [NCORES-1:0]       l1_req_ready,
  // completions
  output logic                            l1_rsp_valid,
  output l1_rsp_t                         l1_rsp,
  // towards the directory
  output logic                            dir_req_valid,
  output dir_req_t                        dir_req,
  input  logic                            dir_req_ready,
  // returned data
  input  logic                            rsp_in_valid,
  input  line_addr_t                      rsp_in_addr,
  output logic                            rsp_in_ready,
  // status
  output logic                            init_done,
  output logic [$clog2(NTBE+1)-1:0]       tbe_free,
  output logic [CNT_W-1:0]                n_np_gets,
  output logic [CNT_W-1:0]                n_isp_gets,
  output logic [CNT_W-1:0]                n_sp_gets,
  output logic [CNT_W-1:0]                n_np_prefetch,
  output logic [CNT_W-1:0]                n_pf_data_ack,
  output logic [CNT_W-1:0]                n_sp_replace,
  output logic [CNT_W-1:0]                n_pf_drop_tbe,
  output logic [CNT_W-1:0]                n_pf_drop_hit,
  output logic [CNT_W-1:0]                n_demand_stall,
  output logic [CNT_W-1:0]                n_writeback
);
  localparam int unsigned QC_W = $clog2(Q_DEPTH + 1);

  // L1 -> L2 request queue
  logic    arb_valid, l1q_ready, l1q_valid, l1q_pop;
  l1_req_t arb_req, l1q_req;
  logic [QC_W-1:0] l1q_count;

  l1_req_arbiter #(.NREQ(NCORES)) u_arb (
    .clk, .rst_n,
    .req_valid(l1_req_valid), .req_type(l1_req_type), .req_addr(l1_req_addr),
    .req_ready(l1_req_ready),
    .out_valid(arb_valid), .out_req(arb_req), .out_ready(l1q_ready)
  );

  sync_fifo #(.WIDTH($bits(l1_req_t)), .DEPTH(Q_DEPTH)) u_l1q (
    .clk, .rst_n,
    .wr_push(arb_valid), .wr_data(arb_req), .wr_ready(l1q_ready),
    .rd_valid(l1q_valid), .rd_data(l1q_req), .rd_pop(l1q_pop), .count(l1q_count)
  );

  // prefetch request queue
  logic       pf_valid, pf_ready, pfq_valid, pfq_pop;
  line_addr_t pf_addr, pfq_addr;
  logic [QC_W-1:0] pfq_count;

  sync_fifo #(.WIDTH(LINE_W), .DEPTH(Q_DEPTH)) u_pfq (
    .clk, .rst_n,
    .wr_push(pf_valid), .wr_data(pf_addr), .wr_ready(pf_ready),
    .rd_valid(pfq_valid), .rd_data(pfq_addr), .rd_pop(pfq_pop), .count(pfq_count)
  );

  // response queue (data returned from other chips / memory)
  logic       rspq_valid, rspq_pop;
  line_addr_t rspq_addr;
  logic [QC_W-1:0] rspq_count;

  sync_fifo #(.WIDTH(LINE_W), .DEPTH(Q_DEPTH)) u_rspq (
    .clk, .rst_n,
    .wr_push(rsp_in_valid), .wr_data(rsp_in_addr), .wr_ready(rsp_in_ready),
    .rd_valid(rspq_valid), .rd_data(rspq_addr), .rd_pop(rspq_pop), .count(rspq_count)
  );

  // L2 -> directory request queue
  logic     dq_push, dq_ready;
  dir_req_t dq_req;
  logic [QC_W-1:0] dq_count;

  sync_fifo #(.WIDTH($bits(dir_req_t)), .DEPTH(Q_DEPTH)) u_dirq (
    .clk, .rst_n,
    .wr_push(dq_push), .wr_data(dq_req), .wr_ready(dq_ready),
    .rd_valid(dir_req_valid), .rd_data(dir_req), .rd_pop(dir_req_valid && dir_req_ready),
    .count(dq_count)
  );

  // shared L2
  logic       miss_valid;
  line_addr_t miss_addr;
  l2_events_t ev;

  l2_cache_ctrl #(.SETS(L2_SETS), .WAYS(L2_WAYS), .NTBE(NTBE)) u_l2 (
    .clk, .rst_n,
    .l1q_valid, .l1q_req, .l1q_pop,
    .pfq_valid, .pfq_addr, .pfq_pop,
    .rsp_valid(rspq_valid), .rsp_addr(rspq_addr), .rsp_pop(rspq_pop),
    .dir_push(dq_push), .dir_req(dq_req), .dir_ready(dq_ready),
    .l1_rsp_valid, .l1_rsp,
    .miss_valid, .miss_addr,
    .ev, .init_done, .tbe_free
  );

  // CZone prefetcher
  logic pf_trig;

  czone_prefetcher #(.ZONE_BITS(ZONE_BITS), .ENTRIES(FT_ENTRIES), .MAX_DEGREE(MAX_DEGREE)) u_pf (
    .clk, .rst_n, .degree,
    .miss_valid, .miss_addr,
    .pf_valid, .pf_addr, .pf_ready,
    .trig(pf_trig)
  );

  prefetch_stats #(.CNT_W(CNT_W)) u_stats (
    .clk, .rst_n, .clear(stats_clear), .ev,
    .n_np_gets, .n_isp_gets, .n_sp_gets, .n_np_prefetch, .n_pf_data_ack,
    .n_sp_replace, .n_pf_drop_tbe, .n_pf_drop_hit, .n_demand_stall, .n_writeback
  );
endmodule
