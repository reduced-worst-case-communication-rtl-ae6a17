// vc_select: VC selection and credit check for one flit at one input port.
//
// The input port's VCs are split into NUM_PRIO groups of VC_PER_PRIO; group
// p holds only packets of priority p. For a head flit the lowest-numbered VC
// of its group that no packet has reserved is selected; for a body or tail
// flit the VC that the VC-to-source mapping table holds for the flit's
// (source_id, packet_id) is selected. "hit" says such a VC exists, "ok"
// that it also has a free flit slot (the credit check), and "occupied" that
// flits of the same packet are already buffered in it, in which case a new
// flit of that packet must be buffered behind them to keep flit order.
//
// The same module is used on both sides of a link: by the upstream router
// on the registered status of the downstream input port (to decide whether a
// flit may be sent there) and by the input port itself (to decide where to
// write it), so both sides agree. Combinational.
module vc_select
  import sharp_pkg::*;
#(
  parameter int NPRIO  = NUM_PRIO,
  parameter int VPP    = VC_PER_PRIO,
  parameter int NVC    = NPRIO * VPP
) (
  input  vc_status_t st [NVC],
  input  flit_t      flit,
  output logic       hit,
  output logic       ok,
  output logic       occupied,
  output logic [$clog2(NVC)-1:0] vc
);

  always_comb begin
    hit = 1'b0;
    vc  = '0;
    if (is_head(flit.ftype)) begin
      for (int v = NVC - 1; v >= 0; v--) begin
        if ((v / VPP) == int'(flit.prio) && !st[v].valid) begin
          hit = 1'b1;
          vc  = ($clog2(NVC))'(v);
        end
      end
    end else begin
      for (int v = NVC - 1; v >= 0; v--) begin
        if (st[v].valid && same_pkt(flit, st[v])) begin
          hit = 1'b1;
          vc  = ($clog2(NVC))'(v);
        end
      end
    end
    ok       = hit && !st[vc].full;
    occupied = hit && !st[vc].empty;
  end

endmodule
