// tb_sharp_router: directed test of one SHARP router at mesh position (2, 2)
// with HPC_MAX = 6 and 2-flit VCs; the neighbours are modelled by driving
// the incoming links and the downstream VC status.
//
// Expected values are worked out from the rules of the design:
//  1. bypass: a head flit arriving from the west with 3 hops left, bound
//     east, leaves east in the same cycle with 2 hops left and reserves a
//     VC on its input port without being buffered;
//  2. hop limit: the same flit with 0 hops left is buffered, and leaves east
//     two clock edges later as a new SSR with HPC_MAX - 1 = 5 hops left;
//  3. ejection: a flit for (2, 2) arriving from the north is ejected in the
//     same cycle;
//  4. output arbitration for the north output: straight (from the south)
//     beats left turn (from the west) beats right turn (from the east) at
//     equal priority and time stamp; priority beats direction; the earlier
//     time stamp beats direction; losers are buffered;
//  5. credit: with every priority-0 VC of the east neighbour reserved, a
//     head flit is stopped here;
//  6. preemption: a low-priority packet from the PE holds the east output;
//     a high-priority flit arriving from the west takes it.
module tb_sharp_router;
  import sharp_pkg::*;

  localparam int NVC = NUM_VC;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic [COORD_W-1:0] my_x = 4'd2, my_y = 4'd2;
  link_t      link_in  [NPORT];
  link_t      link_out [NPORT];
  vc_status_t ds_status [NPORT][NVC];
  vc_status_t us_status [NPORT][NVC];
  logic       inj_valid = 1'b0;
  flit_t      inj_flit = '0;
  logic       inj_ready, ej_valid;
  flit_t      ej_flit;
  router_ev_t ev;

  sharp_router dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic expect_eq(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL: %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  int pkt_n = 0;
  function automatic flit_t mk(flit_type_e t, int prio, int ts, int dx, int dy, int data);
    flit_t f = '0;
    f.ftype = t; f.prio = PRIO_W'(prio); f.ts = TS_W'(ts);
    f.src_x = 4'd0; f.src_y = 4'd0; f.pkt_id = PKT_ID_W'(data / 100);
    f.dst_x = COORD_W'(dx); f.dst_y = COORD_W'(dy); f.data = 32'(data);
    return f;
  endfunction

  function automatic link_t lk(flit_t f, int hops);
    link_t l;
    l.valid = 1'b1; l.hops_left = HOP_W'(hops); l.flit = f;
    return l;
  endfunction

  task automatic idle_links();
    for (int p = 0; p < NPORT; p++) link_in[p] = '0;
  endtask

  // the downstream router reserved VC v for packet id (source (0, 0))
  task automatic ds_reserve(int port, int v, int prio, int id);
    ds_status[port][v] = '{valid: 1, prio: PRIO_W'(prio), src_x: 0, src_y: 0,
                           pkt_id: PKT_ID_W'(id), full: 0, empty: 1};
  endtask

  task automatic ds_free(int port, int v);
    ds_status[port][v].valid = 1'b0;
  endtask

  function automatic int buffered(int port);
    int n = 0;
    for (int v = 0; v < NVC; v++) if (!us_status[port][v].empty) n++;
    return n;
  endfunction

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    idle_links();
    for (int p = 0; p < NPORT; p++)
      for (int v = 0; v < NVC; v++) ds_status[p][v] = '{valid: 0, prio: PRIO_W'(v / VC_PER_PRIO),
                                                   src_x: 0, src_y: 0, pkt_id: 0, full: 0, empty: 1};
    repeat (2) @(posedge clk);
    rst_n = 1'b1;

    // 1. bypass
    @(negedge clk);
    link_in[P_WEST] = lk(mk(FLIT_HEAD, 0, 1, 5, 2, 100), 3);
    #1;
    expect_eq(link_out[P_EAST].valid, 1, "bypass: leaves east");
    expect_eq(link_out[P_EAST].hops_left, 2, "bypass: hops left");
    expect_eq(link_out[P_EAST].flit.data, 100, "bypass: flit");
    expect_eq(ev.bypass, 1, "bypass counted");
    @(negedge clk);
    idle_links();
    expect_eq(us_status[P_WEST][0].valid, 1, "bypass: VC reserved");
    expect_eq(buffered(P_WEST), 0, "bypass: not buffered");
    // tail of the same packet passes and frees the VC
    ds_reserve(P_EAST, 0, 0, 1);
    link_in[P_WEST] = lk(mk(FLIT_TAIL, 0, 1, 5, 2, 101), 3);
    @(negedge clk);
    idle_links();
    expect_eq(us_status[P_WEST][0].valid, 0, "bypass: tail frees VC");
    ds_free(P_EAST, 0);

    // 2. hop limit
    link_in[P_WEST] = lk(mk(FLIT_HEADTAIL, 0, 2, 5, 2, 200), 0);
    #1;
    expect_eq(link_out[P_EAST].valid, 0, "hop limit: not forwarded");
    expect_eq(ev.stop_hpc, 1, "hop limit counted");
    @(negedge clk);
    idle_links();
    expect_eq(buffered(P_WEST), 1, "hop limit: buffered");
    expect_eq(link_out[P_EAST].valid, 0, "hop limit: SA-L cycle");
    @(negedge clk);
    expect_eq(link_out[P_EAST].valid, 1, "hop limit: leaves two edges later");
    expect_eq(link_out[P_EAST].hops_left, 5, "hop limit: new hop budget");
    expect_eq(link_out[P_EAST].flit.data, 200, "hop limit: flit");
    @(negedge clk);
    expect_eq(buffered(P_WEST), 0, "hop limit: popped");

    // 3. ejection from a bypass path
    link_in[P_NORTH] = lk(mk(FLIT_HEADTAIL, 1, 3, 2, 2, 300), 2);
    #1;
    expect_eq(ej_valid, 1, "eject: valid");
    expect_eq(ej_flit.data, 300, "eject: flit");
    expect_eq(ev.eject_bypass, 1, "eject counted");
    @(negedge clk);
    idle_links();

    // 4a. direction: straight > left > right for the north output
    link_in[P_SOUTH] = lk(mk(FLIT_HEADTAIL, 0, 4, 2, 0, 400), 4);
    link_in[P_WEST]  = lk(mk(FLIT_HEADTAIL, 0, 4, 2, 0, 500), 4);
    link_in[P_EAST]  = lk(mk(FLIT_HEADTAIL, 0, 4, 2, 0, 600), 4);
    #1;
    expect_eq(link_out[P_NORTH].flit.data, 400, "straight wins");
    expect_eq(ev.stop_arb, 2, "two losers stopped");
    expect_eq(ev.fifo_wait, 2, "two same-priority losers");
    @(negedge clk);
    idle_links();
    expect_eq(buffered(P_WEST) + buffered(P_EAST), 2, "losers buffered");
    // the buffered ones leave: left turn (west) before right turn (east)
    @(negedge clk);
    expect_eq(link_out[P_NORTH].flit.data, 500, "left turn next");
    @(negedge clk);
    expect_eq(link_out[P_NORTH].flit.data, 600, "right turn last");
    repeat (2) @(negedge clk);

    // 4b. priority beats direction, 4c. earlier time stamp beats direction
    link_in[P_SOUTH] = lk(mk(FLIT_HEADTAIL, 1, 5, 2, 0, 700), 4);
    link_in[P_EAST]  = lk(mk(FLIT_HEADTAIL, 0, 5, 2, 0, 800), 4);
    #1;
    expect_eq(link_out[P_NORTH].flit.data, 800, "priority wins");
    @(negedge clk);
    idle_links();
    repeat (3) @(negedge clk);
    link_in[P_SOUTH] = lk(mk(FLIT_HEADTAIL, 1, 9, 2, 0, 900), 4);
    link_in[P_EAST]  = lk(mk(FLIT_HEADTAIL, 1, 6, 2, 0, 1000), 4);
    #1;
    expect_eq(link_out[P_NORTH].flit.data, 1000, "earlier packet wins");
    @(negedge clk);
    idle_links();
    repeat (3) @(negedge clk);

    // 5. credit: all priority-0 VCs of the east neighbour reserved
    for (int v = 0; v < VC_PER_PRIO; v++) ds_status[P_EAST][v].valid = 1'b1;
    link_in[P_WEST] = lk(mk(FLIT_HEAD, 0, 10, 5, 2, 1100), 3);
    #1;
    expect_eq(link_out[P_EAST].valid, 0, "no credit: not forwarded");
    expect_eq(ev.stop_credit, 1, "credit stop counted");
    @(negedge clk);
    idle_links();
    expect_eq(buffered(P_WEST), 1, "no credit: buffered");
    // a body flit of that packet must queue behind it
    link_in[P_WEST] = lk(mk(FLIT_TAIL, 0, 10, 5, 2, 1101), 3);
    for (int v = 0; v < VC_PER_PRIO; v++) ds_status[P_EAST][v].valid = 1'b0;
    ds_reserve(P_EAST, 0, 0, 11);
    #1;
    expect_eq(ev.stop_order, 1, "order stop counted");
    @(negedge clk);
    idle_links();
    repeat (4) @(negedge clk);
    expect_eq(buffered(P_WEST), 0, "queued packet drained");
    ds_free(P_EAST, 0);

    // 6. preemption: low-priority packet from the PE holds the east output
    inj_valid = 1'b1;
    inj_flit  = mk(FLIT_HEAD, 1, 20, 5, 2, 1200);
    @(negedge clk);
    inj_flit  = mk(FLIT_BODY, 1, 20, 5, 2, 1201);
    @(negedge clk);
    inj_valid = 1'b0;
    #1;
    expect_eq(link_out[P_EAST].flit.data, 1200, "low priority head leaves");
    ds_reserve(P_EAST, 6, 1, 12);
    @(negedge clk);
    inj_valid = 1'b1;
    inj_flit  = mk(FLIT_TAIL, 1, 20, 5, 2, 1202);
    link_in[P_WEST] = lk(mk(FLIT_HEADTAIL, 0, 30, 5, 2, 1300), 3);
    #1;
    expect_eq(link_out[P_EAST].flit.data, 1300, "high priority takes the output");
    expect_eq(ev.preempt, 1, "preemption counted");
    @(negedge clk);
    inj_valid = 1'b0;
    idle_links();
    #1;
    expect_eq(link_out[P_EAST].flit.data, 1201, "low priority resumes");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
