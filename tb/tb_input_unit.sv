// tb_input_unit: directed test of one router input port (2 priority levels x
// 6 VCs, 2-flit VCs).
//
// Checked against values worked out by hand:
//  * a head flit of priority 1 is written into VC 6 (first VC of level 1),
//    reserving it; its SA-L request appears two clock edges after the write
//    (SA-L decides in the cycle after the write and registers the choice);
//  * a later head flit of priority 0 goes to VC 0 and takes over the local
//    request (priority);
//  * among two same-priority packets the one with the earlier time stamp is
//    requested first (FIFO), whatever the order of their VCs;
//  * a VC holding 2 flits reports full; a body flit goes to its packet's VC;
//  * popping a tail flit frees the VC; a head flit passing through reserves
//    a VC without buffering, its tail passing through frees it;
//  * one VC sends one flit per cycle when it is popped back to back.
module tb_input_unit;
  import sharp_pkg::*;

  logic       clk = 1'b0, rst_n = 1'b0;
  flit_t      in_flit = '0;
  logic       in_buffer = 1'b0, in_bypass = 1'b0, pop_en = 1'b0;
  logic       loc_valid;
  logic [3:0] loc_vc;
  flit_t      loc_flit;
  vc_status_t status [NUM_VC];

  input_unit dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic expect_eq(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL: %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic flit_t mk(flit_type_e t, int prio, int ts, int pkt, int data);
    flit_t f = '0;
    f.ftype = t; f.prio = PRIO_W'(prio); f.ts = TS_W'(ts);
    f.src_x = 4'd1; f.src_y = 4'd2; f.pkt_id = PKT_ID_W'(pkt);
    f.dst_x = 4'd3; f.dst_y = 4'd3; f.data = 32'(data);
    return f;
  endfunction

  // drive one flit for one clock edge
  task automatic put(flit_t f, bit buffer_it);
    @(negedge clk);
    in_flit = f; in_buffer = buffer_it; in_bypass = !buffer_it;
    @(negedge clk);
    in_buffer = 1'b0; in_bypass = 1'b0;
  endtask

  task automatic pop_once();
    @(negedge clk);
    pop_en = 1'b1;
    @(negedge clk);
    pop_en = 1'b0;
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // head of packet 1, priority 1, written at one edge
    @(negedge clk);
    in_flit = mk(FLIT_HEAD, 1, 10, 1, 100); in_buffer = 1'b1;
    @(negedge clk);
    in_buffer = 1'b0;
    expect_eq(status[6].valid, 1, "VC 6 reserved by head");
    expect_eq(status[6].empty, 0, "VC 6 holds the head");
    expect_eq(loc_valid, 0, "no request one edge after the write");
    @(negedge clk);
    expect_eq(loc_valid, 1, "request two edges after the write");
    expect_eq(loc_vc, 6, "request from VC 6");
    expect_eq(loc_flit.data, 100, "requested flit");
    // body of packet 1 fills VC 6
    put(mk(FLIT_BODY, 1, 10, 1, 101), 1);
    expect_eq(status[6].full, 1, "VC 6 full after two flits");
    // head of packet 2, priority 0 -> VC 0, takes the request
    put(mk(FLIT_HEADTAIL, 0, 20, 2, 200), 1);
    expect_eq(status[0].valid, 1, "VC 0 reserved");
    @(negedge clk);
    expect_eq(loc_vc, 0, "priority 0 requested first");
    expect_eq(loc_flit.data, 200, "priority 0 flit");
    // pop the single-flit packet: VC 0 freed
    pop_once();
    expect_eq(status[0].valid, 0, "VC 0 freed by popped tail");
    @(negedge clk);
    expect_eq(loc_vc, 6, "back to VC 6");
    // FIFO among same priority: packet 3 (ts 30) into VC 7, packet 4 (ts 5) into VC 8
    put(mk(FLIT_HEAD, 1, 30, 3, 300), 1);
    put(mk(FLIT_HEAD, 1, 5, 4, 400), 1);
    expect_eq(status[7].pkt_id, 3, "packet 3 in VC 7");
    expect_eq(status[8].pkt_id, 4, "packet 4 in VC 8");
    @(negedge clk);
    expect_eq(loc_vc, 8, "earliest packet requested first");
    // head passing through reserves VC 0 without buffering, tail frees it
    put(mk(FLIT_HEAD, 0, 50, 5, 500), 0);
    expect_eq(status[0].valid, 1, "VC 0 reserved by passing head");
    expect_eq(status[0].empty, 1, "passing head not buffered");
    put(mk(FLIT_BODY, 0, 50, 5, 501), 0);
    expect_eq(status[0].valid, 1, "VC 0 still reserved");
    put(mk(FLIT_TAIL, 0, 50, 5, 502), 0);
    expect_eq(status[0].valid, 0, "VC 0 freed by passing tail");
    // back-to-back pops of VC 8 while flits keep arriving: one flit per cycle
    put(mk(FLIT_BODY, 1, 5, 4, 401), 1);
    @(negedge clk);
    expect_eq(loc_vc, 8, "VC 8 requested");
    // VC 8 is full: the first pop frees a slot, refilled while popping
    for (int k = 0; k < 5; k++) begin
      expect_eq(loc_valid, 1, "request every cycle");
      expect_eq(loc_flit.data, 400 + k, "flits in order");
      pop_en = 1'b1;
      in_flit = mk((k == 3) ? FLIT_TAIL : FLIT_BODY, 1, 5, 4, 401 + k);
      in_buffer = (k >= 1 && k <= 3);
      @(negedge clk);
    end
    pop_en = 1'b0; in_buffer = 1'b0;
    expect_eq(status[8].valid, 0, "VC 8 freed after its tail");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
