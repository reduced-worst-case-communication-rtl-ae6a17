// tb_vc_map_table: random reservations and releases against a model.
//
// Each cycle may reserve one unreserved VC for a random packet and free up
// to two VCs (one by a passing tail flit, one by a popped tail flit). After
// every clock edge the exported status (valid bit, priority, source, packet
// id) must equal the model, and the full/empty flags must be the buffer
// flags given to the table.
module tb_vc_map_table;
  import sharp_pkg::*;

  localparam int NVC = NUM_VC;

  logic clk = 1'b0, rst_n = 1'b0;
  logic alloc_en = 1'b0, free_byp_en = 1'b0, free_pop_en = 1'b0;
  logic [3:0] alloc_vc = '0, free_byp_vc = '0, free_pop_vc = '0;
  flit_t alloc_flit = '0;
  logic [NVC-1:0] vc_full = '0, vc_empty = '0;
  vc_status_t status [NVC];

  vc_map_table dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  vc_status_t model [NVC];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < NVC; v++) model[v] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      checks++;
      for (int v = 0; v < NVC; v++) begin
        if (status[v].valid != model[v].valid ||
            (model[v].valid && (status[v].prio != model[v].prio ||
              status[v].src_x != model[v].src_x || status[v].src_y != model[v].src_y ||
              status[v].pkt_id != model[v].pkt_id)) ||
            status[v].full != vc_full[v] || status[v].empty != vc_empty[v]) begin
          failures++;
          if (failures < 10) $display("FAIL: t=%0d vc %0d", t, v);
        end
      end
      vc_full  = NVC'($urandom());
      vc_empty = NVC'($urandom()) & ~vc_full;
      alloc_en = 1'b0;
      alloc_vc = 4'($urandom_range(NVC - 1));
      if (!model[alloc_vc].valid && $urandom_range(1)) alloc_en = 1'b1;
      alloc_flit = flit_t'({$urandom(), $urandom(), $urandom()});
      free_byp_vc = 4'($urandom_range(NVC - 1));
      free_pop_vc = 4'($urandom_range(NVC - 1));
      free_byp_en = $urandom_range(3) == 0;
      free_pop_en = $urandom_range(3) == 0;
      #1;
      checks++;
      for (int v = 0; v < NVC; v++)
        if (status[v].full != vc_full[v] || status[v].empty != vc_empty[v]) failures++;
      @(posedge clk);
      #1;
      if (free_byp_en) model[free_byp_vc].valid = 1'b0;
      if (free_pop_en) model[free_pop_vc].valid = 1'b0;
      if (alloc_en) begin
        model[alloc_vc].valid  = 1'b1;
        model[alloc_vc].prio   = alloc_flit.prio;
        model[alloc_vc].src_x  = alloc_flit.src_x;
        model[alloc_vc].src_y  = alloc_flit.src_y;
        model[alloc_vc].pkt_id = alloc_flit.pkt_id;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
