// tb_vc_fifo: random writes and reads against a queue model.
//
// A 2-flit buffer (the default depth) and writes/reads that follow the rules
// the router keeps: write only when not full or when reading in the same
// cycle, read only when not empty. Every cycle the head flit, empty, full and
// count are compared with the model; the read data must come out in order.
module tb_vc_fifo;
  import sharp_pkg::*;

  localparam int DEPTH = 2;

  logic  clk = 1'b0, rst_n = 1'b0;
  logic  wr_en = 1'b0, rd_en = 1'b0;
  flit_t wr_flit = '0, rd_flit;
  logic  empty, full;
  logic [1:0] count;

  vc_fifo #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  flit_t model [$];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      checks++;
      if (empty != (model.size() == 0) || full != (model.size() == DEPTH) ||
          int'(count) != model.size() || (model.size() > 0 && rd_flit != model[0])) begin
        failures++;
        if (failures < 10)
          $display("FAIL: t=%0d size=%0d empty=%b full=%b count=%0d", t, model.size(),
                   empty, full, count);
      end
      rd_en = (model.size() > 0) && ($urandom_range(2) != 0);
      wr_en = ((model.size() < DEPTH) || rd_en) && ($urandom_range(2) != 0);
      wr_flit = flit_t'({$urandom(), $urandom(), $urandom()});
      @(posedge clk);
      #1;
      if (rd_en) void'(model.pop_front());
      if (wr_en) model.push_back(wr_flit);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
