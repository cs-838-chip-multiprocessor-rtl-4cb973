// tbe_file: the L2's transaction buffer entries (TBEs), one per outstanding off-chip
// request, demand or prefetch.
//
// Each entry records the line address, whether it was issued as a prefetch, and the
// demand requester (core and request type) to answer when the data returns. The address
// field is searched associatively (a CAM): lookup_addr is compared with every valid
// entry in the same cycle, giving lookup_hit, the matching index and its contents.
// Port operations, all taking effect at the next clock edge:
//   alloc  - write alloc_entry into the lowest-numbered free entry (needs !full);
//            alloc_idx shows that entry combinationally,
//   free   - release entry free_idx (data returned),
//   join   - a demand request joins entry join_idx: clear its prefetch flag and record
//            the requester.
// free_count is the number of unused entries, and pf_allowed is high only while more
// than half of the entries are free: the source report's rule for letting a prefetch go off
// chip. The CAM organisation and the entry count of 64 follow the source report; the entry
// layout and the lowest-free allocation are this design's choice.
module tbe_file
  import cmp_pf_pkg::*;
#(
  parameter int unsigned NTBE = 64
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // associative lookup
  input  line_addr_t                  lookup_addr,
  output logic                        lookup_hit,
  output logic [$clog2(NTBE)-1:0]     lookup_idx,
  output tbe_t                        lookup_entry,
  // allocate
  input  logic                        alloc,
  input  tbe_t                        alloc_entry,
  output logic [$clog2(NTBE)-1:0]     alloc_idx,
  // release
  input  logic                        free,
  input  logic [$clog2(NTBE)-1:0]     free_idx,
  // demand joins an outstanding prefetch
  input  logic                        join_req,
  input  logic [$clog2(NTBE)-1:0]     join_idx,
  input  core_id_t                    join_core,
  input  l1_req_type_e                join_type,
  // occupancy
  output logic [$clog2(NTBE+1)-1:0]   free_count,
  output logic                        full,
  output logic                        pf_allowed
);
  localparam int unsigned IW = $clog2(NTBE);
  localparam int unsigned CW = $clog2(NTBE + 1);

  logic [NTBE-1:0] valid;
  tbe_t            ent [NTBE];

  // CAM search
  always_comb begin
    lookup_hit = 1'b0;
    lookup_idx = '0;
    for (int unsigned i = 0; i < NTBE; i++) begin
      if (!lookup_hit && valid[i] && ent[i].addr == lookup_addr) begin
        lookup_hit = 1'b1;
        lookup_idx = IW'(i);
      end
    end
  end
  assign lookup_entry = ent[lookup_idx];

  // lowest free entry
  always_comb begin
    logic found;
    found     = 1'b0;
    alloc_idx = '0;
    for (int unsigned i = 0; i < NTBE; i++) begin
      if (!found && !valid[i]) begin
        found     = 1'b1;
        alloc_idx = IW'(i);
      end
    end
  end

  always_comb begin
    free_count = '0;
    for (int unsigned i = 0; i < NTBE; i++) free_count += CW'(!valid[i]);
  end
  assign full       = (free_count == '0);
  assign pf_allowed = (free_count > CW'(NTBE / 2));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid <= '0;
    end else begin
      if (alloc && !full) valid[alloc_idx] <= 1'b1;
      if (free)           valid[free_idx]  <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (alloc && !full) ent[alloc_idx] <= alloc_entry;
    if (join_req) begin
      ent[join_idx].prefetch <= 1'b0;
      ent[join_idx].core     <= join_core;
      ent[join_idx].rtype    <= join_type;
    end
  end

  a_alloc_not_full: assert property (@(posedge clk) disable iff (!rst_n) alloc |-> !full);
  a_free_valid:     assert property (@(posedge clk) disable iff (!rst_n) free |-> valid[free_idx]);
  a_join_valid:     assert property (@(posedge clk) disable iff (!rst_n) join_req |-> valid[join_idx]);
endmodule
