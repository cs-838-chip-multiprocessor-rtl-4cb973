// czone_filter_table: stride detector of the CZone prefetcher.
//
// The line address space is cut into fixed-size concentration zones (CZones) of
// 2**ZONE_BITS lines; the bits above them are the CZone tag. The low IDX_W bits of the
// CZone tag select one of ENTRIES table rows, and the rest is kept in the row as its tag.
// A row holds tag, state, stride and last address, as in the filter table diagram. For a
// miss address a in a zone whose row matches:
//   delta        = a - last          (the diagram's subtractor)
//   stride match = (delta == stride) (the diagram's comparator)
//   prefetch     = a + stride        (the diagram's adder)
// State per row: INIT (one miss seen), TRANSIENT (a stride recorded, not yet confirmed)
// and STEADY (the same stride seen twice in a row). A stride match in TRANSIENT or STEADY
// raises trig; a mismatch records the new stride and goes (back) to TRANSIENT. A row whose
// tag does not match is taken over (INIT). A miss to the same line as the last one
// (delta 0) changes nothing. Last address and stride are kept as in-zone offsets, since
// the tag already fixes the upper bits.
// Timing: the table is read combinationally, so trig, trig_addr and trig_stride are valid
// in the same cycle as miss_valid; the row is updated at the clock edge. One miss per
// cycle. The row fields and the zone/tag split follow the source report; the zone size, table
// size, state machine details and the delta-0 rule are this design's choice.
module czone_filter_table
  import cmp_pf_pkg::*;
#(
  parameter int unsigned ZONE_BITS = 10,    // 64 KB zones of 64-byte lines
  parameter int unsigned ENTRIES   = 1024
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    miss_valid,
  input  line_addr_t              miss_addr,
  output logic                    trig,         // stride confirmed: start prefetching
  output line_addr_t              trig_addr,    // miss address + stride
  output logic [LINE_W-1:0]       trig_stride,  // stride, sign-extended to a line address
  output logic                    stride_match  // the comparator output
);
  localparam int unsigned IDX_W = $clog2(ENTRIES);
  localparam int unsigned TAG_W = LINE_W - ZONE_BITS - IDX_W;
  localparam int unsigned STR_W = ZONE_BITS + 1;   // signed in-zone difference

  typedef enum logic [1:0] {FT_INIT = 2'd0, FT_TRANSIENT = 2'd1, FT_STEADY = 2'd2} ft_state_e;

  typedef struct packed {
    logic [TAG_W-1:0]     tag;
    ft_state_e            state;
    logic [STR_W-1:0]     stride;
    logic [ZONE_BITS-1:0] last;
  } row_t;

  logic [ENTRIES-1:0] valid;
  row_t               table_q [ENTRIES];

  logic [IDX_W-1:0]     idx;
  logic [TAG_W-1:0]     tag;
  logic [ZONE_BITS-1:0] off;
  row_t                 row, row_nx;
  logic                 hit;
  logic [STR_W-1:0]     delta;

  assign off   = miss_addr[ZONE_BITS-1:0];
  assign idx   = miss_addr[ZONE_BITS +: IDX_W];
  assign tag   = miss_addr[LINE_W-1 -: TAG_W];
  assign row   = table_q[idx];
  assign hit   = valid[idx] && (row.tag == tag);
  assign delta = {1'b0, off} - {1'b0, row.last};

  assign stride_match = hit && (row.state != FT_INIT) && (delta == row.stride);
  assign trig_stride  = LINE_W'(signed'(row.stride));
  assign trig_addr    = miss_addr + trig_stride;
  assign trig         = miss_valid && stride_match && (delta != '0);

  always_comb begin
    row_nx = row;
    if (!hit) begin
      row_nx.tag    = tag;
      row_nx.state  = FT_INIT;
      row_nx.stride = '0;
      row_nx.last   = off;
    end else if (delta != '0) begin
      row_nx.last = off;
      if (row.state == FT_INIT) begin
        row_nx.stride = delta;
        row_nx.state  = FT_TRANSIENT;
      end else if (delta == row.stride) begin
        row_nx.state  = FT_STEADY;
      end else begin
        row_nx.stride = delta;
        row_nx.state  = FT_TRANSIENT;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          valid      <= '0;
    else if (miss_valid) valid[idx] <= 1'b1;
  end

  always_ff @(posedge clk) begin
    if (miss_valid) table_q[idx] <= row_nx;
  end
endmodule
