// tb_prio_arbiter: random requests against a reference arbiter.
//
// Five requesters with random valid bits, priorities, time stamps drawn from
// a small range (so that ties occur) and turn classes. The reference scans
// the requests in index order and keeps the first one that no other beats on
// (priority, time stamp, turn class), smaller being better for all three.
// Checked: gnt_valid, gnt_idx and gnt_onehot. The arbiter is combinational,
// so the result is checked 1 ns after the inputs change.
module tb_prio_arbiter;
  import sharp_pkg::*;

  localparam int N = 5;

  arb_req_t   req [N];
  logic       gnt_valid;
  logic [2:0] gnt_idx;
  logic [N-1:0] gnt_onehot;

  prio_arbiter #(.N(N)) dut (.*);

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
      automatic int best = -1;
      for (int i = 0; i < N; i++) begin
        req[i].valid = ($urandom_range(3) != 0);
        req[i].prio  = PRIO_W'($urandom_range(NUM_PRIO - 1));
        req[i].ts    = TS_W'($urandom_range(3));
        req[i].dir   = 2'($urandom_range(3));
      end
      #1;
      for (int i = 0; i < N; i++) begin
        if (!req[i].valid) continue;
        if (best < 0) best = i;
        else if (req[i].prio < req[best].prio ||
                 (req[i].prio == req[best].prio && req[i].ts < req[best].ts) ||
                 (req[i].prio == req[best].prio && req[i].ts == req[best].ts &&
                  req[i].dir < req[best].dir))
          best = i;
      end
      checks++;
      if (gnt_valid != (best >= 0) ||
          (best >= 0 && (int'(gnt_idx) != best || gnt_onehot != N'(1 << best))) ||
          (best < 0 && gnt_onehot != '0)) begin
        failures++;
        if (failures < 10)
          $display("FAIL: t=%0d expected %0d got valid=%b idx=%0d", t, best, gnt_valid, gnt_idx);
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
