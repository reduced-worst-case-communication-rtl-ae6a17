// tb_vc_select: random VC status tables and flits against a reference.
//
// Default configuration: 2 priority levels x 6 VCs. Reference: a head flit
// of priority p gets the lowest-numbered unreserved VC among VCs 6p..6p+5; a
// body or tail flit gets the reserved VC whose (source, packet id) matches.
// ok = such a VC exists and is not full; occupied = it exists and is not
// empty. Keys are drawn from a small range so that matches are frequent.
module tb_vc_select;
  import sharp_pkg::*;

  localparam int NVC = NUM_VC;

  vc_status_t st [NVC];
  flit_t      flit;
  logic       hit, ok, occupied;
  logic [3:0] vc;

  vc_select dut (.*);

  int checks = 0, failures = 0;

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 5000; t++) begin
      automatic int exp_vc = -1;
      for (int v = 0; v < NVC; v++) begin
        st[v].valid  = ($urandom_range(3) != 0);
        st[v].prio   = PRIO_W'(v / VC_PER_PRIO);
        st[v].src_x  = COORD_W'($urandom_range(1));
        st[v].src_y  = COORD_W'($urandom_range(1));
        st[v].pkt_id = PKT_ID_W'($urandom_range(3));
        st[v].full   = $urandom_range(1);
        st[v].empty  = !st[v].full && $urandom_range(1);
      end
      flit = flit_t'({$urandom(), $urandom(), $urandom()});
      flit.prio  = PRIO_W'($urandom_range(NUM_PRIO - 1));
      flit.src_x = COORD_W'($urandom_range(1));
      flit.src_y = COORD_W'($urandom_range(1));
      flit.pkt_id = PKT_ID_W'($urandom_range(3));
      #1;
      if (flit.ftype == FLIT_HEAD || flit.ftype == FLIT_HEADTAIL) begin
        for (int v = int'(flit.prio) * VC_PER_PRIO; v < (int'(flit.prio) + 1) * VC_PER_PRIO; v++)
          if (exp_vc < 0 && !st[v].valid) exp_vc = v;
      end else begin
        for (int v = 0; v < NVC; v++)
          if (exp_vc < 0 && st[v].valid && st[v].src_x == flit.src_x &&
              st[v].src_y == flit.src_y && st[v].pkt_id == flit.pkt_id) exp_vc = v;
      end
      checks++;
      if (hit != (exp_vc >= 0) ||
          (exp_vc >= 0 && (int'(vc) != exp_vc || ok != !st[exp_vc].full ||
                           occupied != !st[exp_vc].empty)) ||
          (exp_vc < 0 && (ok || occupied))) begin
        failures++;
        if (failures < 10)
          $display("FAIL: t=%0d type=%0d expected vc %0d, got hit=%b vc=%0d ok=%b occ=%b",
                   t, flit.ftype, exp_vc, hit, vc, ok, occupied);
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
