// cmp_pf_pkg: types and constants shared by the shared-L2 CZone prefetching design.
//
// Addresses inside the design are cache-line addresses (byte address with the 6 offset
// bits of a 64-byte line removed). The 40-bit physical byte address and the 2-bit core
// number (four cores per chip) are this design's choices; the 64-byte line and the four
// processors per chip follow the source report's configuration. The L2 line states are the
// usual MSI-style stable and transient states plus the two prefetch states SP (shared,
// prefetched, not yet used) and ISP (prefetch issued, waiting for its data).
package cmp_pf_pkg;

  localparam int unsigned PADDR_W  = 40;                 // physical byte address bits (assumed)
  localparam int unsigned LINE_OFF = 6;                  // 64-byte lines
  localparam int unsigned LINE_W   = PADDR_W - LINE_OFF; // line address bits
  localparam int unsigned NCORES   = 4;                  // processors per chip
  localparam int unsigned CORE_W   = $clog2(NCORES);

  typedef logic [LINE_W-1:0] line_addr_t;
  typedef logic [CORE_W-1:0] core_id_t;

  // Request an L1 cache sends to the L2.
  typedef enum logic {
    REQ_GETS = 1'b0,  // load / instruction fetch: shared copy
    REQ_GETX = 1'b1   // store: exclusive copy
  } l1_req_type_e;

  typedef struct packed {
    core_id_t     core;
    l1_req_type_e rtype;
    line_addr_t   addr;
  } l1_req_t;

  // Request the L2 sends towards the home directory.
  typedef enum logic [1:0] {
    DIR_GETS     = 2'd0,
    DIR_GETX     = 2'd1,
    DIR_PREFETCH = 2'd2,
    DIR_PUTX     = 2'd3   // write-back of a modified line
  } dir_req_type_e;

  typedef struct packed {
    dir_req_type_e rtype;
    line_addr_t    addr;
  } dir_req_t;

  // L2 line state. NP doubles as "invalid".
  typedef enum logic [2:0] {
    L2_NP  = 3'd0,  // not present
    L2_S   = 3'd1,  // shared, demand fetched
    L2_M   = 3'd2,  // exclusive / modified
    L2_SP  = 3'd3,  // shared prefetched, not yet accessed by a demand request
    L2_IS  = 3'd4,  // demand GETS outstanding
    L2_IM  = 3'd5,  // demand GETX outstanding
    L2_ISP = 3'd6   // prefetch outstanding
  } l2_state_e;

  function automatic logic is_transient(l2_state_e s);
    return (s == L2_IS) || (s == L2_IM) || (s == L2_ISP);
  endfunction

  // One transaction buffer entry.
  typedef struct packed {
    line_addr_t   addr;
    logic         prefetch;  // issued as a prefetch and no demand has joined yet
    core_id_t     core;      // demand requester to answer when the data arrives
    l1_req_type_e rtype;
  } tbe_t;

  // Completion message from the L2 back to an L1.
  typedef struct packed {
    core_id_t     core;
    l1_req_type_e rtype;
    line_addr_t   addr;
  } l1_rsp_t;

  // One-cycle event pulses from the L2 controller, named <state>action as in the
  // prefetch transition diagram.
  typedef struct packed {
    logic np_gets;        // demand GETS miss
    logic isp_gets;       // demand GETS to a line whose prefetch is still in flight
    logic sp_gets;        // demand GETS hit on a prefetched line (prefetch hit)
    logic np_prefetch;    // prefetch sent off chip
    logic pf_data_ack;    // prefetch data returned (ISP -> SP)
    logic sp_replace;     // prefetched line evicted unused (SP -> NP)
    logic pf_drop_tbe;    // prefetch dropped: half or fewer of the TBEs free
    logic pf_drop_hit;    // prefetch dropped: line already present or in flight
    logic demand_stall;   // demand request had to wait (TBEs, busy set or pending line)
    logic writeback;      // modified victim written back
  } l2_events_t;

endpackage
