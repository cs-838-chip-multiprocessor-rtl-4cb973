// l2_cache_ctrl: controller and tag/state array of the chip's shared L2 cache, with the
// shared-prefetched states that keep prefetching from disturbing the demand miss stream.
//
// Sources. Three queues feed the controller: responses from off chip (data for an
// outstanding request), demand requests from the L1 caches (GETS or GETX) and prefetch
// requests from the CZone prefetcher. Responses go first, then demand requests, then
// prefetches; after a demand request had to wait, one waiting prefetch is let through
// before the demand request is tried again. A queue entry is only popped once it has been
// handled, so a request that must wait simply stays at the head of its queue.
//
// Timing. Every operation takes two cycles: IDLE picks a source and reads the set from
// the synchronous tag/state array; LOOK compares the tags, searches the TBEs, and writes
// the set, the TBEs and the outgoing queues at the end of the cycle. After reset the
// controller spends SETS cycles clearing the array (init_done low).
//
// Line states (see cmp_pf_pkg): NP, S, M, and the transient IS, IM while a demand fill is
// outstanding. A prefetch that finds the line absent, and more than half of the TBEs
// free, allocates a way in state ISP, a TBE, and sends a PREFETCH to the directory; its
// data (PrefetchDataAck) turns ISP into SP. A demand GETS that hits SP (a prefetch hit)
// turns it into S, and one that hits ISP joins the outstanding prefetch's TBE (ISP->IS);
// both send their address to the prefetcher as if they had missed. A GETS that misses
// (<NP>GETS) allocates IS and a TBE, sends GETS off chip and is also sent to the
// prefetcher. GETX requests are never sent to the prefetcher. Evicting an SP line is an
// unused prefetch (sp_replace). Prefetches that find the line present or in flight, or
// find half or fewer of the TBEs free, are dropped.
//
// Replacement (this design's choice): an empty way if there is one, otherwise the first
// way in a stable state (S, M, SP) at or after a per-set round-robin pointer; ways in a
// transient state are never evicted. A modified victim is written back (PUTX) first, in
// an operation of its own, and the request is then retried. Clean victims are dropped
// silently. The way is allocated when the request is sent, so the line's transient state
// is visible to later requests.
//
// Follows the source report: the 4 MB, 4-way, 64-byte-line geometry (16384 sets), 64 TBEs,
// the SP/ISP states and their transitions, the half-free-TBE prefetch rule, prefetching
// GETS only, and the miss-stream feed. This design's own choices: the queue priorities,
// the two-cycle operation, the replacement policy, the blocking of requests to lines
// with a demand fill outstanding, and leaving out line data and coherence requests that
// arrive from other chips (the tag/state side only).
module l2_cache_ctrl
  import cmp_pf_pkg::*;
#(
  parameter int unsigned SETS = 16384,
  parameter int unsigned WAYS = 4,
  parameter int unsigned NTBE = 64
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // L1 -> L2 request queue head
  input  logic                      l1q_valid,
  input  l1_req_t                   l1q_req,
  output logic                      l1q_pop,
  // prefetch request queue head
  input  logic                      pfq_valid,
  input  line_addr_t                pfq_addr,
  output logic                      pfq_pop,
  // response queue head (data returned for an outstanding request)
  input  logic                      rsp_valid,
  input  line_addr_t                rsp_addr,
  output logic                      rsp_pop,
  // L2 -> directory request queue tail
  output logic                      dir_push,
  output dir_req_t                  dir_req,
  input  logic                      dir_ready,
  // completion to the L1 caches
  output logic                      l1_rsp_valid,
  output l1_rsp_t                   l1_rsp,
  // miss address stream to the prefetcher
  output logic                      miss_valid,
  output line_addr_t                miss_addr,
  // status
  output l2_events_t                ev,
  output logic                      init_done,
  output logic [$clog2(NTBE+1)-1:0] tbe_free
);
  localparam int unsigned SET_W = $clog2(SETS);
  localparam int unsigned WAY_W = (WAYS > 1) ? $clog2(WAYS) : 1;
  localparam int unsigned TAG_W = LINE_W - SET_W;
  localparam int unsigned TI_W  = $clog2(NTBE);

  typedef struct packed {
    logic [TAG_W-1:0] tag;
    l2_state_e        state;
  } way_t;

  typedef struct packed {
    logic [WAY_W-1:0]   rr;
    way_t [WAYS-1:0]    way;
  } set_t;

  typedef enum logic [1:0] {C_INIT, C_IDLE, C_LOOK} ctrl_e;
  typedef enum logic [1:0] {SRC_RSP, SRC_L1, SRC_PF} src_e;

  ctrl_e            st_q;
  src_e             src_q;
  line_addr_t       op_addr;
  core_id_t         op_core;
  l1_req_type_e     op_type;
  logic             l1_blocked_q;
  logic [SET_W-1:0] init_ctr;

  // ---------------- tag/state array (synchronous read) ----------------
  set_t             tags_q [SETS];
  set_t             rd_q;
  logic             rd_en;
  logic [SET_W-1:0] rd_set;
  logic             wr_en;
  logic [SET_W-1:0] wr_set;
  set_t             wr_word;

  logic             arr_we;
  set_t             arr_wdata;
  assign arr_we    = wr_en || (st_q == C_INIT);
  assign wr_set    = (st_q == C_INIT) ? init_ctr : op_addr[SET_W-1:0];
  assign arr_wdata = (st_q == C_INIT) ? '0 : wr_word;

  always_ff @(posedge clk) begin
    if (rd_en)  rd_q <= tags_q[rd_set];
    if (arr_we) tags_q[wr_set] <= arr_wdata;
  end

  // ---------------- TBEs ----------------
  logic            tbe_hit, tbe_full, tbe_pf_ok;
  logic [TI_W-1:0] tbe_idx, tbe_alloc_idx;
  tbe_t            tbe_ent, tbe_new;
  logic            tbe_alloc, tbe_free_en, tbe_join;

  tbe_file #(.NTBE(NTBE)) u_tbe (
    .clk, .rst_n,
    .lookup_addr(op_addr), .lookup_hit(tbe_hit), .lookup_idx(tbe_idx), .lookup_entry(tbe_ent),
    .alloc(tbe_alloc), .alloc_entry(tbe_new), .alloc_idx(tbe_alloc_idx),
    .free(tbe_free_en), .free_idx(tbe_idx),
    .join_req(tbe_join), .join_idx(tbe_idx), .join_core(op_core), .join_type(op_type),
    .free_count(tbe_free), .full(tbe_full), .pf_allowed(tbe_pf_ok)
  );

  // ---------------- lookup ----------------
  logic [TAG_W-1:0] op_tag;
  logic [SET_W-1:0] op_set;
  logic             hit;
  logic [WAY_W-1:0] hit_way;
  logic             vict_found;
  logic [WAY_W-1:0] vict_way;
  l2_state_e        hit_st, vict_st;

  assign op_set = op_addr[SET_W-1:0];
  assign op_tag = op_addr[LINE_W-1:SET_W];

  always_comb begin
    hit     = 1'b0;
    hit_way = '0;
    for (int unsigned w = 0; w < WAYS; w++) begin
      if (!hit && rd_q.way[w].state != L2_NP && rd_q.way[w].tag == op_tag) begin
        hit     = 1'b1;
        hit_way = WAY_W'(w);
      end
    end
  end

  always_comb begin
    vict_found = 1'b0;
    vict_way   = '0;
    for (int unsigned w = 0; w < WAYS; w++) begin
      if (!vict_found && rd_q.way[w].state == L2_NP) begin
        vict_found = 1'b1;
        vict_way   = WAY_W'(w);
      end
    end
    for (int unsigned k = 0; k < WAYS; k++) begin
      int unsigned w;
      w = (int'(rd_q.rr) + k) % WAYS;
      if (!vict_found && !is_transient(rd_q.way[w].state)) begin
        vict_found = 1'b1;
        vict_way   = WAY_W'(w);
      end
    end
  end

  assign hit_st  = rd_q.way[hit_way].state;
  assign vict_st = rd_q.way[vict_way].state;

  // ---------------- decision (in C_LOOK) ----------------
  logic done;      // the operation is finished: pop its queue
  logic l1_stall;  // a demand request has to wait

  always_comb begin
    wr_word      = rd_q;
    wr_en        = 1'b0;
    done         = 1'b0;
    l1_stall     = 1'b0;
    dir_push     = 1'b0;
    dir_req      = '{rtype: DIR_GETS, addr: op_addr};
    l1_rsp_valid = 1'b0;
    l1_rsp       = '{core: op_core, rtype: op_type, addr: op_addr};
    miss_valid   = 1'b0;
    miss_addr    = op_addr;
    tbe_alloc    = 1'b0;
    tbe_free_en  = 1'b0;
    tbe_join     = 1'b0;
    tbe_new      = '{addr: op_addr, prefetch: 1'b0, core: op_core, rtype: op_type};
    ev           = '0;

    if (st_q == C_LOOK) begin
      unique case (src_q)
        // ---------------- data returned ----------------
        SRC_RSP: begin
          done        = 1'b1;
          tbe_free_en = tbe_hit;
          if (hit && is_transient(hit_st)) begin
            wr_en = 1'b1;
            unique case (hit_st)
              L2_IS:   wr_word.way[hit_way].state = L2_S;
              L2_IM:   wr_word.way[hit_way].state = L2_M;
              default: wr_word.way[hit_way].state = L2_SP;   // ISP: PrefetchDataAck
            endcase
            ev.pf_data_ack = (hit_st == L2_ISP);
            if (tbe_hit && !tbe_ent.prefetch) begin
              l1_rsp_valid = 1'b1;
              l1_rsp       = '{core: tbe_ent.core, rtype: tbe_ent.rtype, addr: op_addr};
            end
          end
        end

        // ---------------- demand request ----------------
        SRC_L1: begin
          if (hit) begin
            unique case (hit_st)
              L2_S, L2_M, L2_SP: begin
                if (op_type == REQ_GETS) begin
                  done         = 1'b1;
                  l1_rsp_valid = 1'b1;
                  if (hit_st == L2_SP) begin
                    wr_en                       = 1'b1;
                    wr_word.way[hit_way].state  = L2_S;
                    miss_valid                  = 1'b1;
                    ev.sp_gets                  = 1'b1;
                  end
                end else if (hit_st == L2_M) begin
                  done         = 1'b1;
                  l1_rsp_valid = 1'b1;
                end else if (!tbe_full && dir_ready) begin
                  // upgrade of a shared copy
                  done                       = 1'b1;
                  wr_en                      = 1'b1;
                  wr_word.way[hit_way].state = L2_IM;
                  tbe_alloc                  = 1'b1;
                  dir_push                   = 1'b1;
                  dir_req.rtype              = DIR_GETX;
                end else begin
                  l1_stall = 1'b1;
                end
              end
              L2_ISP: begin
                if (op_type == REQ_GETS && tbe_hit) begin
                  done                       = 1'b1;
                  wr_en                      = 1'b1;
                  wr_word.way[hit_way].state = L2_IS;
                  tbe_join                   = 1'b1;
                  miss_valid                 = 1'b1;
                  ev.isp_gets                = 1'b1;
                end else begin
                  l1_stall = 1'b1;
                end
              end
              default: l1_stall = 1'b1;   // IS, IM: a demand fill is outstanding
            endcase
          end else if (!vict_found || tbe_full || !dir_ready) begin
            l1_stall = 1'b1;
          end else if (vict_st == L2_M) begin
            // write the modified victim back first; the request is retried
            wr_en                        = 1'b1;
            wr_word.way[vict_way].state  = L2_NP;
            dir_push                     = 1'b1;
            dir_req                      = '{rtype: DIR_PUTX,
                                             addr: {rd_q.way[vict_way].tag, op_set}};
            ev.writeback                 = 1'b1;
          end else begin
            done                         = 1'b1;
            wr_en                        = 1'b1;
            wr_word.way[vict_way].tag    = op_tag;
            wr_word.way[vict_way].state  = (op_type == REQ_GETS) ? L2_IS : L2_IM;
            wr_word.rr                   = vict_way + 1'b1;
            tbe_alloc                    = 1'b1;
            dir_push                     = 1'b1;
            dir_req.rtype                = (op_type == REQ_GETS) ? DIR_GETS : DIR_GETX;
            ev.sp_replace                = (vict_st == L2_SP);
            if (op_type == REQ_GETS) begin
              miss_valid = 1'b1;
              ev.np_gets = 1'b1;
            end
          end
        end

        // ---------------- prefetch request ----------------
        default: begin
          if (hit || tbe_hit) begin
            done           = 1'b1;
            ev.pf_drop_hit = 1'b1;
          end else if (!tbe_pf_ok) begin
            done           = 1'b1;
            ev.pf_drop_tbe = 1'b1;
          end else if (!vict_found) begin
            done           = 1'b1;                // every way of the set is busy
          end else if (!dir_ready) begin
            done           = 1'b0;                // wait for room towards the directory
          end else if (vict_st == L2_M) begin
            wr_en                        = 1'b1;
            wr_word.way[vict_way].state  = L2_NP;
            dir_push                     = 1'b1;
            dir_req                      = '{rtype: DIR_PUTX,
                                             addr: {rd_q.way[vict_way].tag, op_set}};
            ev.writeback                 = 1'b1;
          end else begin
            done                         = 1'b1;
            wr_en                        = 1'b1;
            wr_word.way[vict_way].tag    = op_tag;
            wr_word.way[vict_way].state  = L2_ISP;
            wr_word.rr                   = vict_way + 1'b1;
            tbe_alloc                    = 1'b1;
            tbe_new.prefetch             = 1'b1;
            dir_push                     = 1'b1;
            dir_req.rtype                = DIR_PREFETCH;
            ev.np_prefetch               = 1'b1;
            ev.sp_replace                = (vict_st == L2_SP);
          end
        end
      endcase
      ev.demand_stall = l1_stall;
    end
  end

  assign rsp_pop = (st_q == C_LOOK) && (src_q == SRC_RSP) && done;
  assign l1q_pop = (st_q == C_LOOK) && (src_q == SRC_L1)  && done;
  assign pfq_pop = (st_q == C_LOOK) && (src_q == SRC_PF)  && done;

  // ---------------- source selection and sequencing ----------------
  logic pick_any;
  src_e pick;
  always_comb begin
    pick_any = rsp_valid || l1q_valid || pfq_valid;
    if (rsp_valid)                       pick = SRC_RSP;
    else if (l1q_valid && !(l1_blocked_q && pfq_valid)) pick = SRC_L1;
    else if (pfq_valid)                  pick = SRC_PF;
    else                                 pick = SRC_L1;
  end

  always_comb begin
    rd_en  = (st_q == C_IDLE) && pick_any;
    unique case (pick)
      SRC_RSP: rd_set = rsp_addr[SET_W-1:0];
      SRC_L1:  rd_set = l1q_req.addr[SET_W-1:0];
      default: rd_set = pfq_addr[SET_W-1:0];
    endcase
  end

  // the clearing sweep after reset shares the array's write port
  assign init_done = (st_q != C_INIT);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q         <= C_INIT;
      src_q        <= SRC_RSP;
      op_addr      <= '0;
      op_core      <= '0;
      op_type      <= REQ_GETS;
      l1_blocked_q <= 1'b0;
      init_ctr     <= '0;
    end else begin
      unique case (st_q)
        C_INIT: begin
          init_ctr <= init_ctr + 1'b1;
          if (init_ctr == SET_W'(SETS - 1)) st_q <= C_IDLE;
        end
        C_IDLE: begin
          if (pick_any) begin
            st_q  <= C_LOOK;
            src_q <= pick;
            unique case (pick)
              SRC_RSP: begin op_addr <= rsp_addr; end
              SRC_L1:  begin op_addr <= l1q_req.addr; op_core <= l1q_req.core;
                             op_type <= l1q_req.rtype; end
              default: begin op_addr <= pfq_addr; end
            endcase
            if (pick == SRC_PF) l1_blocked_q <= 1'b0;
          end
        end
        default: begin
          st_q <= C_IDLE;
          if (l1_stall) l1_blocked_q <= 1'b1;
          else if (src_q == SRC_L1) l1_blocked_q <= 1'b0;
        end
      endcase
    end
  end

  a_pop_one: assert property (@(posedge clk) disable iff (!rst_n)
                              $onehot0({rsp_pop, l1q_pop, pfq_pop}));
  // Returned data always belongs to an outstanding request.
  a_rsp_has_tbe: assert property (@(posedge clk) disable iff (!rst_n)
                                  (st_q == C_LOOK && src_q == SRC_RSP) |-> tbe_hit && hit);
  a_push_ready: assert property (@(posedge clk) disable iff (!rst_n) dir_push |-> dir_ready);
endmodule
