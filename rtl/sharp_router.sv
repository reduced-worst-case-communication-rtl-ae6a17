// sharp_router: a SHARP router with priority-preemptive wormhole scheduling.
//
// Five ports: the PE (P_LOCAL) and the four mesh directions. Each port has
// an input_unit (VC buffers, VC-to-source mapping table, SA-L). Every cycle
// the router runs the global switch allocation (SA-G) for all requests that
// reach it:
//
//  * input arbitration, per input port, between the SSR arriving on the
//    port's link (a flit that may bypass this router) and the port's local
//    request (the flit SA-L chose in the previous cycle), after the blocking
//    tests: an arriving flit must stop here if flits of its packet are
//    buffered here (flit order), or if it has used up its HPC_MAX hops; a
//    request may only leave on a mesh port if the next router has a VC for it
//    (a free VC of its priority for a head flit, the packet's reserved VC for
//    a body/tail flit) with a free slot. The winner is chosen by priority,
//    then FIFO (earlier packet release time); a tie goes to the buffered flit.
//  * output arbitration, per output port, among the input winners routed
//    there (XY routing): priority, then FIFO, then straight > left turn >
//    right turn.
//  * configuration: the arriving flit of a port is written into its VC
//    buffer (BW_ena = 1) unless it won an output, in which case it passes
//    the port (BW_ena = 0) and the crossbar (XB_sel) connects the port's
//    bypass (BM_sel = bypass) or buffered (BM_sel = local) flit to the output.
//
// The winner on a mesh output leaves as an SSR+flit on link_out in the same
// cycle: a flit from the buffer starts with HPC_MAX hops, a bypassing one
// keeps its remaining budget; each link costs one hop. Because the next
// router decides combinationally, one flit crosses up to HPC_MAX links in a
// clock cycle, stopping at the first router where it loses, is blocked or
// runs out of hops. A flit routed to P_LOCAL here is ejected to the PE in the
// same cycle (ej_valid/ej_flit; the PE always accepts).
//
// Arbitration is per flit, so a higher-priority packet takes an output from
// a lower-priority packet between two of its flits (preemption); the
// preempted packet waits in its VCs. Same-priority packets never preempt
// each other because the earlier-released one always wins.
//
// Timing: a flit written into a buffer at a clock edge is chosen by SA-L in
// the next cycle and crosses the crossbar in the cycle after: two cycles per
// stopping router (router stage 1 cycle, link 1 cycle), then one flit per
// cycle for the body. Injection: inj_flit is taken when inj_valid and
// inj_ready are high at a clock edge (inj_ready: its VC has room).
//
// From the design description: arbitration by priority, then FIFO, then
// direction (the order of the directions is this design's choice), the
// blocking tests, VC reservation by the head flit at every router it
// crosses, credits between neighbours, HPC_MAX, ejection at the destination
// without the router pipeline. Own choices: the SSR and the flit travel in
// the same cycle (the description leaves the pipeline to the original
// SHARP), FIFO order by packet release time, ties between a bypassing and a
// buffered flit going to the buffered one, and the event counters.
//
// The combinational bypass path runs from link_in to link_out, and the mesh
// chains such paths over up to HPC_MAX routers; XY routing makes the chain
// acyclic (x-direction paths feed y-direction ones, never the reverse), even
// though a lint tool that treats each array as one signal may report a loop.
module sharp_router
  import sharp_pkg::*;
#(
  parameter int HPC_MAX = 6,
  parameter int BUFF    = 2,
  parameter int NPRIO   = NUM_PRIO,
  parameter int VPP     = VC_PER_PRIO,
  parameter int NVC     = NPRIO * VPP
) (
  input  logic       clk,
  input  logic       rst_n,
  // coordinates of this router in the mesh (tied to constants)
  input  logic [COORD_W-1:0] my_x,
  input  logic [COORD_W-1:0] my_y,
  // mesh links, index = port_e (index 0 unused)
  input  link_t      link_in   [NPORT],
  output link_t      link_out  [NPORT],
  // status of the downstream input port behind each output (credit)
  input  vc_status_t ds_status [NPORT][NVC],
  // status of this router's input ports, for the upstream neighbours
  output vc_status_t us_status [NPORT][NVC],
  // PE interface
  input  logic       inj_valid,
  input  flit_t      inj_flit,
  output logic       inj_ready,
  output logic       ej_valid,
  output flit_t      ej_flit,
  // monitoring
  output router_ev_t ev
);

  localparam int VW = $clog2(NVC);

  // ---- input units ----------------------------------------------------------
  flit_t          in_flit   [NPORT];
  logic [NPORT-1:0] in_buffer, in_bypass, pop_en, loc_valid;
  logic [VW-1:0]  loc_vc    [NPORT];
  flit_t          loc_flit  [NPORT];

  for (genvar i = 0; i < NPORT; i++) begin : g_in
    input_unit #(.NPRIO(NPRIO), .VPP(VPP), .NVC(NVC), .BUFF(BUFF)) u_iu (
      .clk, .rst_n,
      .in_flit  (in_flit[i]),
      .in_buffer(in_buffer[i]),
      .in_bypass(in_bypass[i]),
      .loc_valid(loc_valid[i]),
      .loc_vc   (loc_vc[i]),
      .loc_flit (loc_flit[i]),
      .pop_en   (pop_en[i]),
      .status   (us_status[i])
    );
  end

  // ---- blocking tests ---------------------------------------------------------
  // candidate 0: local request of port i, candidate 1: arriving SSR
  flit_t           cand_flit [NPORT][2];
  port_e           cand_out  [NPORT][2];
  logic            cand_raw  [NPORT][2];   // present
  logic            cand_ok   [NPORT][2];   // passes the blocking tests
  logic            ds_ok     [NPORT][2];
  logic            own_occ   [NPORT];
  logic            own_ok    [NPORT];
  vc_status_t      ds_sel_st [NPORT][2][NVC];

  for (genvar i = 0; i < NPORT; i++) begin : g_cand
    // the arriving flit: from the link, or from the PE on the local port
    assign in_flit[i] = (i == 0) ? inj_flit : link_in[i].flit;

    logic own_hit;
    logic [VW-1:0] own_vc;
    vc_select #(.NPRIO(NPRIO), .VPP(VPP), .NVC(NVC)) u_own (
      .st(us_status[i]), .flit(in_flit[i]),
      .hit(own_hit), .ok(own_ok[i]), .occupied(own_occ[i]), .vc(own_vc)
    );

    assign cand_flit[i][0] = loc_flit[i];
    assign cand_flit[i][1] = link_in[i].flit;
    assign cand_raw[i][0]  = loc_valid[i];
    assign cand_raw[i][1]  = (i != 0) && link_in[i].valid;

    for (genvar c = 0; c < 2; c++) begin : g_c
      logic ds_hit, ds_occ;
      logic [VW-1:0] ds_vc;
      assign cand_out[i][c] = xy_route(cand_flit[i][c], my_x, my_y);
      always_comb begin
        for (int v = 0; v < NVC; v++) ds_sel_st[i][c][v] = ds_status[cand_out[i][c]][v];
      end
      vc_select #(.NPRIO(NPRIO), .VPP(VPP), .NVC(NVC)) u_ds (
        .st(ds_sel_st[i][c]), .flit(cand_flit[i][c]),
        .hit(ds_hit), .ok(ds_ok[i][c]), .occupied(ds_occ), .vc(ds_vc)
      );
    end

    always_comb begin
      // buffered flit: needs a VC with room downstream unless it is ejected
      cand_ok[i][0] = cand_raw[i][0] &&
                      (cand_out[i][0] == P_LOCAL || ds_ok[i][0]);
      // arriving flit: no buffered flits of its packet here, hops left
      cand_ok[i][1] = cand_raw[i][1] && !own_occ[i] &&
                      (cand_out[i][1] == P_LOCAL ||
                       (link_in[i].hops_left != '0 && ds_ok[i][1]));
    end
  end

  // ---- input arbitration ------------------------------------------------------
  logic [NPORT-1:0] iw_valid;
  logic             iw_sel    [NPORT];      // 1: the arriving flit won
  flit_t            iw_flit   [NPORT];
  port_e            iw_out    [NPORT];

  for (genvar i = 0; i < NPORT; i++) begin : g_ia
    arb_req_t ia_req [2];
    logic     ia_gv;
    logic [0:0] ia_gi;
    logic [1:0] ia_oh;
    always_comb begin
      for (int c = 0; c < 2; c++) begin
        ia_req[c].valid = cand_ok[i][c];
        ia_req[c].prio  = cand_flit[i][c].prio;
        ia_req[c].ts    = cand_flit[i][c].ts;
        ia_req[c].dir   = 2'd0;
      end
    end
    prio_arbiter #(.N(2)) u_ia (
      .req(ia_req), .gnt_valid(ia_gv), .gnt_idx(ia_gi), .gnt_onehot(ia_oh)
    );
    assign iw_valid[i] = ia_gv;
    assign iw_sel[i]   = ia_gi[0];
    assign iw_flit[i]  = cand_flit[i][ia_gi];
    assign iw_out[i]   = cand_out[i][ia_gi];
  end

  // ---- output arbitration -----------------------------------------------------
  logic [NPORT-1:0] oa_valid;
  logic [2:0]       oa_idx [NPORT];
  arb_req_t         oa_req [NPORT][NPORT];
  logic [NPORT-1:0] granted;                 // input i won its output

  for (genvar o = 0; o < NPORT; o++) begin : g_oa
    logic [NPORT-1:0] oh;
    always_comb begin
      for (int i = 0; i < NPORT; i++) begin
        oa_req[o][i].valid = iw_valid[i] && iw_out[i] == port_e'(o);
        oa_req[o][i].prio  = iw_flit[i].prio;
        oa_req[o][i].ts    = iw_flit[i].ts;
        oa_req[o][i].dir   = turn_of(port_e'(i), port_e'(o));
      end
    end
    prio_arbiter #(.N(NPORT)) u_oa (
      .req(oa_req[o]), .gnt_valid(oa_valid[o]), .gnt_idx(oa_idx[o]), .gnt_onehot(oh)
    );
  end

  always_comb begin
    granted = '0;
    for (int o = 0; o < NPORT; o++)
      if (oa_valid[o]) granted[oa_idx[o]] = 1'b1;
  end

  // ---- configuration and switch traversal -------------------------------------
  always_comb begin
    for (int i = 0; i < NPORT; i++) begin
      pop_en[i]    = granted[i] && !iw_sel[i];
      in_bypass[i] = granted[i] &&  iw_sel[i];
      in_buffer[i] = (i == 0) ? (inj_valid && own_ok[0])
                              : (cand_raw[i][1] && !(granted[i] && iw_sel[i]));
    end
    link_out[0] = '0;
    for (int o = 1; o < NPORT; o++) begin
      link_out[o] = '0;
      if (oa_valid[o]) begin
        link_out[o].valid     = 1'b1;
        link_out[o].flit      = iw_flit[oa_idx[o]];
        link_out[o].hops_left = iw_sel[oa_idx[o]]
                                ? link_in[oa_idx[o]].hops_left - 1'b1
                                : HOP_W'(HPC_MAX - 1);
      end
    end
    ej_valid = oa_valid[0];
    ej_flit  = iw_flit[oa_idx[0]];
  end

  assign inj_ready = own_ok[0];

  // ---- preemption tracking and events -----------------------------------------
  // Per output: the packet that used it last and has not sent its tail yet.
  logic              held_v    [NPORT];
  logic [PRIO_W-1:0] held_prio [NPORT];
  logic [COORD_W-1:0] held_sx  [NPORT];
  logic [COORD_W-1:0] held_sy  [NPORT];
  logic [PKT_ID_W-1:0] held_id [NPORT];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int o = 0; o < NPORT; o++) begin
        held_v[o] <= 1'b0; held_prio[o] <= '0;
        held_sx[o] <= '0; held_sy[o] <= '0; held_id[o] <= '0;
      end
    end else begin
      for (int o = 0; o < NPORT; o++) begin
        if (oa_valid[o]) begin
          held_v[o]    <= !is_tail(iw_flit[oa_idx[o]].ftype);
          held_prio[o] <= iw_flit[oa_idx[o]].prio;
          held_sx[o]   <= iw_flit[oa_idx[o]].src_x;
          held_sy[o]   <= iw_flit[oa_idx[o]].src_y;
          held_id[o]   <= iw_flit[oa_idx[o]].pkt_id;
        end
      end
    end
  end

  always_comb begin
    ev = '0;
    for (int i = 1; i < NPORT; i++) begin
      if (cand_raw[i][1]) begin
        if (granted[i] && iw_sel[i]) begin
          if (iw_out[i] != P_LOCAL) ev.bypass = ev.bypass + 3'd1;
          else                      ev.eject_bypass = ev.eject_bypass + 3'd1;
        end else if (own_occ[i])
          ev.stop_order = ev.stop_order + 3'd1;
        else if (cand_out[i][1] != P_LOCAL && link_in[i].hops_left == '0)
          ev.stop_hpc = ev.stop_hpc + 3'd1;
        else if (!cand_ok[i][1])
          ev.stop_credit = ev.stop_credit + 3'd1;
        else
          ev.stop_arb = ev.stop_arb + 3'd1;
      end
    end
    for (int o = 0; o < NPORT; o++) begin
      if (oa_valid[o]) begin
        if (held_v[o] && iw_flit[oa_idx[o]].prio < held_prio[o] &&
            !(iw_flit[oa_idx[o]].src_x == held_sx[o] &&
              iw_flit[oa_idx[o]].src_y == held_sy[o] &&
              iw_flit[oa_idx[o]].pkt_id == held_id[o]))
          ev.preempt = ev.preempt + 3'd1;
        for (int i = 0; i < NPORT; i++)
          if (oa_req[o][i].valid && 3'(i) != oa_idx[o] &&
              oa_req[o][i].prio == iw_flit[oa_idx[o]].prio)
            ev.fifo_wait = ev.fifo_wait + 3'd1;
      end
    end
  end

endmodule
