// input_unit: one input port of a SHARP router.
//
// It holds NVC virtual channels, each a vc_fifo of BUFF flits, grouped by
// priority, and the port's VC-to-source mapping table. A flit that arrives
// on the port either stops here (in_buffer: the BW_ena multiplexer of the
// port selects the buffer) or passes straight through towards the crossbar
// (in_bypass). In both cases the port selects the flit's VC with vc_select:
// a head flit reserves a free VC of its priority, a tail flit frees the
// packet's VC when it passes through; a buffered flit is written into it.
//
// Local switch allocation (SA-L) picks, among the VCs holding flits, the one
// whose front flit has the highest priority, and among equal priorities the
// packet released first (first-in-first-out). The choice is registered: in
// the next cycle the router sees it as this port's local request (loc_*),
// which is the first of the two router-stage cycles a buffered flit spends.
// A VC that the current pop empties (and no write refills) is not chosen
// again, so one VC can send a flit every cycle without a wasted request.
// When the router grants the local request it pops the flit (pop_en); a
// popped tail flit frees its VC.
//
// status[] exports the mapping table and the full/empty state of every VC;
// all of it comes from registers and serves the upstream router as credit.
module input_unit
  import sharp_pkg::*;
#(
  parameter int NPRIO = NUM_PRIO,
  parameter int VPP   = VC_PER_PRIO,
  parameter int NVC   = NPRIO * VPP,
  parameter int BUFF  = 2
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // arriving flit
  input  flit_t                  in_flit,
  input  logic                   in_buffer,   // stop here: write into its VC
  input  logic                   in_bypass,   // passes through this port
  // local request towards the router's arbiters
  output logic                   loc_valid,
  output logic [$clog2(NVC)-1:0] loc_vc,
  output flit_t                  loc_flit,
  input  logic                   pop_en,      // local request granted
  // registered port status (credits, VC reservations)
  output vc_status_t             status [NVC]
);

  localparam int VW = $clog2(NVC);
  localparam int CW = $clog2(BUFF + 1);

  flit_t          front  [NVC];
  logic [NVC-1:0] v_full, v_empty, v_wr, v_rd;
  logic [CW-1:0]  v_cnt  [NVC];

  // ---- VC selection for the arriving flit ------------------------------
  logic          sel_hit, sel_ok, sel_occ;
  logic [VW-1:0] sel_vc;

  vc_select #(.NPRIO(NPRIO), .VPP(VPP), .NVC(NVC)) u_sel (
    .st(status), .flit(in_flit),
    .hit(sel_hit), .ok(sel_ok), .occupied(sel_occ), .vc(sel_vc)
  );

  // ---- VC buffers ---------------------------------------------------------
  for (genvar v = 0; v < NVC; v++) begin : g_vc
    assign v_wr[v] = in_buffer && sel_ok && (sel_vc == VW'(v));
    assign v_rd[v] = pop_en && (loc_vc == VW'(v));
    vc_fifo #(.DEPTH(BUFF)) u_fifo (
      .clk, .rst_n,
      .wr_en(v_wr[v]), .wr_flit(in_flit),
      .rd_en(v_rd[v]), .rd_flit(front[v]),
      .empty(v_empty[v]), .full(v_full[v]), .count(v_cnt[v])
    );
  end

  // ---- mapping table --------------------------------------------------------
  logic pop_tail;
  assign pop_tail = pop_en && is_tail(loc_flit.ftype);

  vc_map_table #(.NVC(NVC)) u_map (
    .clk, .rst_n,
    .alloc_en   (((in_buffer || in_bypass) && sel_hit && in_flit.ftype == FLIT_HEAD)
                 || (in_buffer && sel_hit && in_flit.ftype == FLIT_HEADTAIL)),
    .alloc_vc   (sel_vc),
    .alloc_flit (in_flit),
    .free_byp_en(in_bypass && sel_hit && in_flit.ftype == FLIT_TAIL),
    .free_byp_vc(sel_vc),
    .free_pop_en(pop_tail),
    .free_pop_vc(loc_vc),
    .vc_full    (v_full),
    .vc_empty   (v_empty),
    .status     (status)
  );

  // ---- SA-L -----------------------------------------------------------------
  arb_req_t       sal_req [NVC];
  logic           sal_gv;
  logic [VW-1:0]  sal_gi;
  logic [NVC-1:0] sal_oh;
  logic           sal_valid_q;
  logic [VW-1:0]  sal_vc_q;

  always_comb begin
    for (int v = 0; v < NVC; v++) begin
      sal_req[v].valid = !v_empty[v] && !(v_rd[v] && !v_wr[v] && v_cnt[v] == CW'(1));
      sal_req[v].prio  = front[v].prio;
      sal_req[v].ts    = front[v].ts;
      sal_req[v].dir   = 2'd0;
    end
  end

  prio_arbiter #(.N(NVC)) u_sal (
    .req(sal_req), .gnt_valid(sal_gv), .gnt_idx(sal_gi), .gnt_onehot(sal_oh)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sal_valid_q <= 1'b0;
      sal_vc_q    <= '0;
    end else begin
      sal_valid_q <= sal_gv;
      sal_vc_q    <= sal_gi;
    end
  end

  assign loc_vc    = sal_vc_q;
  assign loc_valid = sal_valid_q && !v_empty[sal_vc_q];
  assign loc_flit  = front[sal_vc_q];

  a_buffer_has_room: assert property (@(posedge clk) disable iff (!rst_n)
    in_buffer |-> sel_ok);
  a_one_use: assert property (@(posedge clk) disable iff (!rst_n)
    !(in_buffer && in_bypass));
  a_pop_valid: assert property (@(posedge clk) disable iff (!rst_n)
    pop_en |-> loc_valid);

endmodule
