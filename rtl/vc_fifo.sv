// vc_fifo: the flit buffer of one virtual channel.
//
// A circular buffer of DEPTH flits (the per-VC buffer depth "buff"; 2 flits
// by default, the smaller of the two depths the design is evaluated with,
// 32 being the other). One write and one read may happen in the same cycle;
// the head of the queue (rd_flit) is visible combinationally while not
// empty. Writing when full or reading when empty is a protocol error checked
// by assertions; the router never does either because it checks "full"
// (its credit) before sending a flit here. Reset empties the buffer.
module vc_fifo
  import sharp_pkg::*;
#(
  parameter int DEPTH = 2
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  wr_en,
  input  flit_t wr_flit,
  input  logic  rd_en,
  output flit_t rd_flit,
  output logic  empty,
  output logic  full,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int CW = $clog2(DEPTH + 1);

  flit_t         mem [DEPTH];
  logic [AW-1:0] wr_ptr, rd_ptr;
  logic [CW-1:0] cnt;

  function automatic logic [AW-1:0] incr(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      cnt    <= '0;
    end else begin
      if (wr_en) wr_ptr <= incr(wr_ptr);
      if (rd_en) rd_ptr <= incr(rd_ptr);
      cnt <= cnt + CW'(wr_en) - CW'(rd_en);
    end
  end

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_ptr] <= wr_flit;
  end

  assign rd_flit = mem[rd_ptr];
  assign empty   = (cnt == '0);
  assign full    = (cnt == CW'(DEPTH));
  assign count   = cnt;

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) wr_en |-> (!full || rd_en));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) rd_en |-> !empty);

endmodule
