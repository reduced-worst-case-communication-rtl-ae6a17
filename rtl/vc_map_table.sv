// vc_map_table: the VC-to-source (packet) mapping table of one input port.
//
// Each VC has one entry: a valid bit, the packet's priority and its key
// (source_id, packet_id). A head flit reserves a VC (alloc_*) when it is
// buffered at this port or when it bypasses the router, so that its body
// and tail flits find a VC here if they are stopped later; the tail flit
// frees it, either when it bypasses the port (free_byp_*) or when it leaves
// the VC buffer (free_pop_*). Both frees and one reservation can happen in
// the same cycle. The entries are registers and are exported, together with
// the full/empty state of each VC buffer, as the port's status: the upstream
// router reads it as its credit and VC information, within the same clock
// cycle in which the whole bypass path is reserved.
//
// Reset clears all entries. Reserving a VC that is already reserved is a
// protocol error and is checked by an assertion.
module vc_map_table
  import sharp_pkg::*;
#(
  parameter int NVC = NUM_VC
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   alloc_en,
  input  logic [$clog2(NVC)-1:0] alloc_vc,
  input  flit_t                  alloc_flit,
  input  logic                   free_byp_en,
  input  logic [$clog2(NVC)-1:0] free_byp_vc,
  input  logic                   free_pop_en,
  input  logic [$clog2(NVC)-1:0] free_pop_vc,
  input  logic [NVC-1:0]         vc_full,
  input  logic [NVC-1:0]         vc_empty,
  output vc_status_t             status [NVC]
);

  typedef struct packed {
    logic                valid;
    logic [PRIO_W-1:0]   prio;
    logic [COORD_W-1:0]  src_x;
    logic [COORD_W-1:0]  src_y;
    logic [PKT_ID_W-1:0] pkt_id;
  } entry_t;

  entry_t tbl [NVC];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int v = 0; v < NVC; v++) tbl[v] <= '0;
    end else begin
      for (int v = 0; v < NVC; v++) begin
        if (free_byp_en && free_byp_vc == ($clog2(NVC))'(v)) tbl[v].valid <= 1'b0;
        if (free_pop_en && free_pop_vc == ($clog2(NVC))'(v)) tbl[v].valid <= 1'b0;
        if (alloc_en && alloc_vc == ($clog2(NVC))'(v)) begin
          tbl[v].valid  <= 1'b1;
          tbl[v].prio   <= alloc_flit.prio;
          tbl[v].src_x  <= alloc_flit.src_x;
          tbl[v].src_y  <= alloc_flit.src_y;
          tbl[v].pkt_id <= alloc_flit.pkt_id;
        end
      end
    end
  end

  always_comb begin
    for (int v = 0; v < NVC; v++) begin
      status[v].valid  = tbl[v].valid;
      status[v].prio   = tbl[v].prio;
      status[v].src_x  = tbl[v].src_x;
      status[v].src_y  = tbl[v].src_y;
      status[v].pkt_id = tbl[v].pkt_id;
      status[v].full   = vc_full[v];
      status[v].empty  = vc_empty[v];
    end
  end

  a_alloc_free_vc: assert property (@(posedge clk) disable iff (!rst_n)
    alloc_en |-> !tbl[alloc_vc].valid);

endmodule
