// prefetch_addr_gen: turns one stride trigger into the prefetch addresses
// a+s, a+2s, ..., a+d*s, where a is the miss address, s the detected stride and d the
// prefetch degree.
//
// On load it takes the first address (a+s), the stride and the degree currently on the
// degree input, and then offers one address per cycle on pf_valid/pf_addr; each accepted
// address (pf_ready high) is followed by the next one, formed by adding the stride again.
// A new load replaces whatever is left of the previous sequence: the newest stride is
// the most useful one, and the L2 drops prefetches it cannot take anyway. Degree 0 turns
// prefetching off. The address sequence and the degree follow the source report; the one-
// address-per-cycle issue and the replace-on-new-trigger rule are this design's choice.
module prefetch_addr_gen
  import cmp_pf_pkg::*;
#(
  parameter int unsigned MAX_DEGREE = 16
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic [$clog2(MAX_DEGREE+1)-1:0] degree,
  input  logic                            load,
  input  line_addr_t                      first_addr,
  input  logic [LINE_W-1:0]               stride,
  output logic                            pf_valid,
  output line_addr_t                      pf_addr,
  input  logic                            pf_ready,
  output logic                            busy
);
  localparam int unsigned DW = $clog2(MAX_DEGREE + 1);

  line_addr_t        next_q;
  logic [LINE_W-1:0] stride_q;
  logic [DW-1:0]     left_q;
  logic [DW-1:0]     deg_c;

  assign deg_c    = (degree > DW'(MAX_DEGREE)) ? DW'(MAX_DEGREE) : degree;
  assign pf_valid = (left_q != '0);
  assign pf_addr  = next_q;
  assign busy     = pf_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      next_q   <= '0;
      stride_q <= '0;
      left_q   <= '0;
    end else if (load) begin
      next_q   <= first_addr;
      stride_q <= stride;
      left_q   <= deg_c;
    end else if (pf_valid && pf_ready) begin
      next_q   <= next_q + stride_q;
      left_q   <= left_q - 1'b1;
    end
  end
endmodule
