// l1_req_arbiter: merges the request streams of the chip's L1 caches onto the single
// L1-to-L2 request queue.
//
// The chip diagram joins the four L1 data caches onto one path into the L2 request
// queue; GETS also covers instruction fetches, so each port carries all L2 requests of
// one processor (its L1 instruction and data caches). How the ports share the queue is
// this design's choice: a round-robin arbiter. Each cycle at
// most one requester is granted, starting the search one past the last winner, so every
// requesting L1 is served within NREQ grants. A request is held by its L1 (valid high,
// fields stable) until req_ready is seen high in the same cycle. The granted request is
// tagged with the requester's core number and presented on out_valid/out_req, combi-
// nationally, for one cycle; out_ready (the queue's free-space flag) gates the grant.
module l1_req_arbiter
  import cmp_pf_pkg::*;
#(
  parameter int unsigned NREQ = NCORES
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic         [NREQ-1:0]       req_valid,
  input  l1_req_type_e [NREQ-1:0]       req_type,
  input  line_addr_t   [NREQ-1:0]       req_addr,
  output logic         [NREQ-1:0]       req_ready,
  output logic                          out_valid,
  output l1_req_t                       out_req,
  input  logic                          out_ready
);
  localparam int unsigned IW = (NREQ > 1) ? $clog2(NREQ) : 1;

  logic [IW-1:0] last;    // last granted requester
  logic [IW-1:0] winner;
  logic          found;

  always_comb begin
    found  = 1'b0;
    winner = '0;
    for (int unsigned k = 1; k <= NREQ; k++) begin
      int unsigned idx;
      idx = (int'(last) + k) % NREQ;
      if (!found && req_valid[idx]) begin
        found  = 1'b1;
        winner = IW'(idx);
      end
    end
  end

  always_comb begin
    req_ready = '0;
    if (found && out_ready) req_ready[winner] = 1'b1;
  end

  assign out_valid     = found && out_ready;
  assign out_req.core  = core_id_t'(winner);
  assign out_req.rtype = req_type[winner];
  assign out_req.addr  = req_addr[winner];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         last <= IW'(NREQ - 1);
    else if (out_valid) last <= winner;
  end

  // Requester rule: a request, once raised, stays with the same fields until granted.
  for (genvar i = 0; i < NREQ; i++) begin : g_hold
    a_hold: assert property (@(posedge clk) disable iff (!rst_n)
      req_valid[i] && !req_ready[i] |=> req_valid[i] && $stable(req_addr[i]) && $stable(req_type[i]));
  end
endmodule
