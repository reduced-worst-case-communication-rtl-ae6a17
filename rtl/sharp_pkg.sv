// sharp_pkg: types and constants shared by the priority-preemptive SHARP
// network-on-chip.
//
// A SHARP router lets a flit cross up to HPC_MAX routers in one clock cycle
// over a bypass path that a SMART-hop setup request (SSR) builds router by
// router. In this design the SSR and the flit it sets up travel together on
// a link (link_t): the SSR part is the valid bit, the remaining hop budget and
// the flit header (priority, FIFO time stamp, route), the data part is the
// payload. Contention is resolved by predefined priorities (a smaller value
// wins), then first-in-first-out among same-priority packets, then by the
// direction of travel: straight before left turn before right turn (this
// order of directions is this design's own choice).
//
// Following the design description: priority levels are ceil(n_vc / t_b) with
// t_b = 6 VCs per level, the SSR carries ceil(log2(levels)) priority bits,
// flits are keyed by (source_id, packet_id) for the VC-to-source mapping
// table, XY routing. Own choices: the field widths of the flit, the time
// stamp used for FIFO order, coordinates of up to 16 x 16 routers, port
// numbering and "north" meaning a smaller y.
package sharp_pkg;

  // --- configuration --------------------------------------------------------
  localparam int NUM_PRIO    = 2;                 // priority levels
  localparam int VC_PER_PRIO = 6;                 // VCs per level (covers t_b = 6)
  localparam int NUM_VC      = NUM_PRIO * VC_PER_PRIO;
  localparam int PRIO_W      = (NUM_PRIO > 1) ? $clog2(NUM_PRIO) : 1;
  localparam int COORD_W     = 4;                 // up to 16 x 16 routers
  localparam int PKT_ID_W    = 8;
  localparam int TS_W        = 16;
  localparam int HOP_W       = 4;                 // HPC_MAX up to 15
  localparam int DATA_W      = 32;

  // --- ports -----------------------------------------------------------------
  localparam int NPORT = 5;
  typedef enum logic [2:0] {
    P_LOCAL = 3'd0,
    P_NORTH = 3'd1,   // towards smaller y
    P_EAST  = 3'd2,   // towards larger x
    P_SOUTH = 3'd3,   // towards larger y
    P_WEST  = 3'd4    // towards smaller x
  } port_e;

  typedef enum logic [1:0] {
    FLIT_HEAD     = 2'd0,
    FLIT_BODY     = 2'd1,
    FLIT_TAIL     = 2'd2,
    FLIT_HEADTAIL = 2'd3   // single-flit packet
  } flit_type_e;

  typedef struct packed {
    flit_type_e          ftype;
    logic [PRIO_W-1:0]   prio;     // smaller value = higher priority
    logic [TS_W-1:0]     ts;       // packet release time, FIFO order
    logic [COORD_W-1:0]  src_x;
    logic [COORD_W-1:0]  src_y;
    logic [PKT_ID_W-1:0] pkt_id;
    logic [COORD_W-1:0]  dst_x;
    logic [COORD_W-1:0]  dst_y;
    logic [DATA_W-1:0]   data;
  } flit_t;

  // SSR plus the flit that follows it over the bypass path.
  typedef struct packed {
    logic              valid;
    logic [HOP_W-1:0]  hops_left;  // links it may still cross this cycle
    flit_t             flit;
  } link_t;

  // One entry of the VC-to-source mapping table as seen by the upstream
  // router (registered, so it acts as the credit/VC-status signal).
  typedef struct packed {
    logic                valid;    // VC reserved by a packet
    logic [PRIO_W-1:0]   prio;
    logic [COORD_W-1:0]  src_x;
    logic [COORD_W-1:0]  src_y;
    logic [PKT_ID_W-1:0] pkt_id;
    logic                full;     // no free flit slot
    logic                empty;    // no flit buffered
  } vc_status_t;

  // Arbitration request: what every arbiter in the router compares.
  typedef struct packed {
    logic              valid;
    logic [PRIO_W-1:0] prio;
    logic [TS_W-1:0]   ts;
    logic [1:0]        dir;        // 0 straight, 1 left, 2 right, 3 other
  } arb_req_t;

  // Per-cycle event counts of one router, for performance monitoring.
  typedef struct packed {
    logic [2:0] bypass;       // flits that crossed the router without stopping
    logic [2:0] stop_hpc;     // flits stopped because HPC_MAX hops were used up
    logic [2:0] stop_arb;     // flits stopped because they lost arbitration
    logic [2:0] stop_credit;  // flits stopped: no VC/buffer at the next router
    logic [2:0] stop_order;   // flits stopped behind buffered flits of their packet
    logic [2:0] preempt;      // outputs taken from an unfinished lower-priority packet
    logic [2:0] fifo_wait;    // requests that lost to a same-priority, earlier packet
    logic [2:0] eject_bypass; // flits ejected straight from an incoming bypass path
  } router_ev_t;

  function automatic logic is_head(flit_type_e t);
    return (t == FLIT_HEAD) || (t == FLIT_HEADTAIL);
  endfunction

  function automatic logic is_tail(flit_type_e t);
    return (t == FLIT_TAIL) || (t == FLIT_HEADTAIL);
  endfunction

  // Same packet: the (source_id, packet_id) key of the mapping table.
  function automatic logic same_pkt(flit_t f, vc_status_t s);
    return (f.src_x == s.src_x) && (f.src_y == s.src_y) && (f.pkt_id == s.pkt_id);
  endfunction

  // XY dimension-order routing.
  function automatic port_e xy_route(flit_t f, logic [COORD_W-1:0] x,
                                     logic [COORD_W-1:0] y);
    if (f.dst_x > x)      return P_EAST;
    else if (f.dst_x < x) return P_WEST;
    else if (f.dst_y > y) return P_SOUTH;
    else if (f.dst_y < y) return P_NORTH;
    else                  return P_LOCAL;
  endfunction

  // Turn class of a flit entering on port ip and leaving on port op:
  // 0 straight, 1 left turn, 2 right turn, 3 from the PE or to the PE.
  function automatic logic [1:0] turn_of(port_e ip, port_e op);
    if (ip == P_LOCAL || op == P_LOCAL) return 2'd3;
    // entering on the west port means travelling east, and so on
    unique case (ip)
      P_WEST:  return (op == P_EAST)  ? 2'd0 : (op == P_NORTH) ? 2'd1 : 2'd2;
      P_EAST:  return (op == P_WEST)  ? 2'd0 : (op == P_SOUTH) ? 2'd1 : 2'd2;
      P_SOUTH: return (op == P_NORTH) ? 2'd0 : (op == P_WEST)  ? 2'd1 : 2'd2;
      P_NORTH: return (op == P_SOUTH) ? 2'd0 : (op == P_EAST)  ? 2'd1 : 2'd2;
      default: return 2'd3;
    endcase
  endfunction

  // a is released before b (time stamps wrap around).
  function automatic logic ts_before(logic [TS_W-1:0] a, logic [TS_W-1:0] b);
    logic [TS_W-1:0] d;
    d = a - b;
    return d[TS_W-1];
  endfunction

  // Request a beats request b: priority, then FIFO, then direction.
  function automatic logic req_beats(arb_req_t a, arb_req_t b);
    if (!a.valid) return 1'b0;
    if (!b.valid) return 1'b1;
    if (a.prio != b.prio) return a.prio < b.prio;
    if (a.ts != b.ts) return ts_before(a.ts, b.ts);
    return a.dir < b.dir;
  endfunction

endpackage
