// tb_sharp_mesh: end-to-end test of the SHARP mesh, reduced to 4 x 4 routers
// with HPC_MAX = 2 so that routes need several stopping routers (2-flit VCs,
// 2 priority levels x 6 VCs). tb_sharp_mesh_full runs the same checks on the
// default 8 x 8 mesh with HPC_MAX = 6.
//
// Every node has a PE model that injects its packets flit by flit; a
// scoreboard checks that every flit reaches its destination once, in order,
// with its header and payload intact, and that every packet is delivered.
//  1. Zero-load latency: single packets over random routes and lengths in an
//     idle mesh. Expected tail-ejection time after head injection:
//     2 * max(1, ceil(hops / HPC_MAX)) + (L - 1).
//  2. Preemption: a long low-priority packet crosses a row; a high-priority
//     packet injected on its path takes the shared links and must still see
//     exactly its zero-load latency.
//  3. Same priority: the same pattern with equal priorities; the later packet
//     waits (FIFO) and is delivered after the first one.
//  4. Uniform random traffic: packets of 5 to 50 flits (the packet sizes of
//     the evaluated workloads) between random nodes with random priorities.
// Each mechanism (multi-hop bypass, stop at the hop limit, stop after lost
// arbitration, stop for lack of credit/VC, stop behind buffered flits of the
// same packet, preemption, same-priority FIFO wait, ejection from a bypass
// path) must occur at least once.
module tb_sharp_mesh;
  import sharp_pkg::*;

  localparam int MX = 4, MY = 4, HPC = 2, BUF = 2;
  localparam int NN = MX * MY;
  localparam int MAXPKT = 2048;
  localparam int R1 = MY / 2, R2 = MY - 1;   // rows of the contention tests

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       inj_valid [NN];
  flit_t      inj_flit  [NN];
  logic       inj_ready [NN];
  logic       ej_valid  [NN];
  flit_t      ej_flit   [NN];
  router_ev_t ev        [NN];

  sharp_mesh #(.MESH_X(MX), .MESH_Y(MY), .HPC_MAX(HPC), .BUFF(BUF)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int unsigned cycle = 0;

  // ---- packet table --------------------------------------------------------
  typedef struct {
    int src, dst, len, prio;
    int unsigned t_head;    // cycle the head flit was accepted
    int unsigned t_tail;    // cycle the tail flit was ejected
    int next_ej;            // next flit index expected at the destination
    bit done;
  } pkt_t;

  pkt_t pk [MAXPKT];
  int   npk = 0;
  int   q [NN][$];          // per node: packets still to inject
  int   cur_flit [NN];      // flits of the front packet already injected

  function automatic int new_pkt(int s, int d, int l, int p);
    pk[npk] = '{src: s, dst: d, len: l, prio: p, t_head: 0, t_tail: 0,
                next_ej: 0, done: 0};
    q[s].push_back(npk);
    npk++;
    return npk - 1;
  endfunction

  function automatic int hops(int s, int d);
    automatic int dx = (s % MX) - (d % MX);
    automatic int dy = (s / MX) - (d / MX);
    return (dx < 0 ? -dx : dx) + (dy < 0 ? -dy : dy);
  endfunction

  function automatic int stops(int s, int d);
    automatic int st = (hops(s, d) + HPC - 1) / HPC;
    return (st < 1) ? 1 : st;
  endfunction

  // idle-network latency: 2 cycles per stopping router, 1 per further flit
  function automatic int zero_load(int s, int d, int l);
    return 2 * stops(s, d) + (l - 1);
  endfunction

  function automatic flit_t make_flit(int id, int idx);
    flit_t f;
    f = '0;
    if (pk[id].len == 1)            f.ftype = FLIT_HEADTAIL;
    else if (idx == 0)              f.ftype = FLIT_HEAD;
    else if (idx == pk[id].len - 1) f.ftype = FLIT_TAIL;
    else                            f.ftype = FLIT_BODY;
    f.prio   = PRIO_W'(pk[id].prio);
    f.ts     = TS_W'(id);           // release order = packet number
    f.src_x  = COORD_W'(pk[id].src % MX);
    f.src_y  = COORD_W'(pk[id].src / MX);
    f.pkt_id = PKT_ID_W'(id);
    f.dst_x  = COORD_W'(pk[id].dst % MX);
    f.dst_y  = COORD_W'(pk[id].dst / MX);
    f.data   = {16'(id), 16'(idx)};
    return f;
  endfunction

  // ---- PE injection: drive on the falling edge ------------------------------
  always @(negedge clk) begin
    for (int n = 0; n < NN; n++) begin
      inj_valid[n] <= 1'b0;
      inj_flit[n]  <= '0;
      if (rst_n && q[n].size() > 0) begin
        inj_valid[n] <= 1'b1;
        inj_flit[n]  <= make_flit(q[n][0], cur_flit[n]);
      end
    end
  end

  // ---- event counters -------------------------------------------------------
  longint n_bypass = 0, n_hpc = 0, n_arb = 0, n_credit = 0, n_order = 0;
  longint n_preempt = 0, n_fifo = 0, n_ejbyp = 0;

  // ---- scoreboard on the rising edge ----------------------------------------
  always @(posedge clk) begin
    if (rst_n) begin
      cycle <= cycle + 1;
      for (int n = 0; n < NN; n++) begin
        n_bypass  += ev[n].bypass;   n_hpc    += ev[n].stop_hpc;
        n_arb     += ev[n].stop_arb; n_credit += ev[n].stop_credit;
        n_order   += ev[n].stop_order; n_preempt += ev[n].preempt;
        n_fifo    += ev[n].fifo_wait; n_ejbyp  += ev[n].eject_bypass;
        if (inj_valid[n] && inj_ready[n]) begin
          automatic int id = q[n][0];
          if (cur_flit[n] == 0) pk[id].t_head = cycle;
          if (cur_flit[n] == pk[id].len - 1) begin
            void'(q[n].pop_front());
            cur_flit[n] = 0;
          end else begin
            cur_flit[n]++;
          end
        end
        if (ej_valid[n]) begin
          int id, idx;
          flit_t f;
          f = ej_flit[n];
          id = int'(f.data[31:16]);
          idx = int'(f.data[15:0]);
          checks++;
          if (id >= npk || pk[id].dst != n || idx != pk[id].next_ej ||
              f != make_flit(id, idx) || pk[id].done) begin
            failures++;
            $display("FAIL: node %0d ejected packet %0d flit %0d (expected flit %0d at node %0d)",
                     n, id, idx, (id < npk) ? pk[id].next_ej : -1, (id < npk) ? pk[id].dst : -1);
          end else begin
            pk[id].next_ej++;
            if (idx == pk[id].len - 1) begin
              pk[id].done = 1;
              pk[id].t_tail = cycle;
            end
          end
        end
      end
    end
  end

  task automatic wait_all(int first, int last, int limit);
    automatic int t = 0;
    automatic bit all;
    do begin
      @(posedge clk);
      t++;
      all = 1;
      for (int i = first; i <= last; i++) if (!pk[i].done) all = 0;
    end while (!all && t < limit);
    repeat (3) @(posedge clk);
  endtask

  task automatic check_delivered(int first, int last);
    for (int i = first; i <= last; i++) begin
      checks++;
      if (!pk[i].done) begin
        failures++;
        $display("FAIL: packet %0d (%0d -> %0d, %0d flits) not delivered", i,
                 pk[i].src, pk[i].dst, pk[i].len);
      end
    end
  endtask

  // slack: extra cycles allowed on top of expect_lat
  task automatic check_latency(int id, int expect_lat, int slack, string what);
    automatic int lat = int'(pk[id].t_tail - pk[id].t_head);
    checks++;
    if (lat < expect_lat || lat > expect_lat + slack) begin
      failures++;
      $display("FAIL: %s: packet %0d (%0d -> %0d, %0d hops, %0d flits) latency %0d, expected %0d",
               what, id, pk[id].src, pk[id].dst, hops(pk[id].src, pk[id].dst),
               pk[id].len, lat, expect_lat);
    end
  endtask

  // ---- watchdog ---------------------------------------------------------------
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- stimulus -----------------------------------------------------------------
  initial begin
    int id, a, b, first;
    for (int n = 0; n < NN; n++) cur_flit[n] = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);

    // 1. zero-load latency
    for (int k = 0; k < 40; k++) begin
      automatic int s = $urandom_range(NN - 1);
      automatic int d = $urandom_range(NN - 1);
      automatic int l = (k < 4) ? 1 + k : $urandom_range(50, 1);
      if (k == 4) begin s = 0; d = NN - 1; end          // longest route
      if (k == 5) begin s = 0; d = (HPC < MX) ? HPC : MX - 1; end  // HPC_MAX hops
      id = new_pkt(s, d, l, $urandom_range(NUM_PRIO - 1));
      wait_all(id, id, 500);
      check_delivered(id, id);
      // With 2-flit VCs the credit of an intermediate stopping router is
      // late by one cycle after the first two flits; a body flit sent then is
      // stopped one router early, which costs up to 2 cycles per extra stop.
      check_latency(id, zero_load(s, d, l),
                    (l > 2 && BUF < 3) ? 2 * (stops(s, d) - 1) : 0, "zero-load");
    end

    // 2. preemption: low priority (0,2)->(7,2), then high priority (2,2)->(7,2)
    a = new_pkt(R1 * MX + 0, R1 * MX + MX - 1, 40, 1);
    repeat (6) @(posedge clk);
    b = new_pkt(R1 * MX + 1, R1 * MX + MX - 1, 20, 0);
    wait_all(a, b, 2000);
    check_delivered(a, b);
    check_latency(b, zero_load(R1 * MX + 1, R1 * MX + MX - 1, 20),
                  (BUF < 3) ? 2 * (stops(R1 * MX + 1, R1 * MX + MX - 1) - 1) : 0,
                  "high priority under preemption");
    checks++;
    if (pk[a].t_tail <= pk[b].t_tail) begin
      failures++;
      $display("FAIL: low-priority packet finished before the high-priority one");
    end

    // 3. same priority: the earlier packet keeps the shared links (FIFO)
    a = new_pkt(R2 * MX + 0, R2 * MX + MX - 1, 40, 1);
    repeat (6) @(posedge clk);
    b = new_pkt(R2 * MX + 1, R2 * MX + MX - 1, 20, 1);
    wait_all(a, b, 2000);
    check_delivered(a, b);
    checks++;
    if (pk[a].t_tail >= pk[b].t_tail) begin
      failures++;
      $display("FAIL: same priority: the later packet finished first");
    end

    // 4. uniform random traffic
    first = npk;
    for (int r = 0; r < 3; r++)
      for (int n = 0; n < NN; n++)
        void'(new_pkt(n, $urandom_range(NN - 1), $urandom_range(50, 5),
                      $urandom_range(NUM_PRIO - 1)));
    wait_all(first, npk - 1, 100000);
    check_delivered(first, npk - 1);

    $display("events: bypass=%0d stop_hpc=%0d stop_arb=%0d stop_credit=%0d stop_order=%0d preempt=%0d fifo_wait=%0d eject_bypass=%0d",
             n_bypass, n_hpc, n_arb, n_credit, n_order, n_preempt, n_fifo, n_ejbyp);
    checks += 8;
    if (n_bypass  == 0) begin failures++; $display("FAIL: no multi-hop bypass"); end
    if (n_hpc     == 0) begin failures++; $display("FAIL: no stop at the hop limit"); end
    if (n_arb     == 0) begin failures++; $display("FAIL: no stop after lost arbitration"); end
    if (n_credit  == 0) begin failures++; $display("FAIL: no stop for lack of credit"); end
    if (n_order   == 0) begin failures++; $display("FAIL: no stop behind buffered flits"); end
    if (n_preempt == 0) begin failures++; $display("FAIL: no preemption"); end
    if (n_fifo    == 0) begin failures++; $display("FAIL: no same-priority FIFO wait"); end
    if (n_ejbyp   == 0) begin failures++; $display("FAIL: no ejection from a bypass path"); end
    $display("packets=%0d cycles=%0d", npk, cycle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
