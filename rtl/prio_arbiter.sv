// prio_arbiter: fixed-priority arbiter used by every arbitration stage of the
// SHARP router (local switch allocation over VCs, input arbitration between
// an incoming SSR and the local winner, output arbitration over input ports).
//
// A request carries a priority (smaller wins), the release time stamp of its
// packet (earlier wins: first-in-first-out among same-priority packets) and a
// turn class (straight, then left turn, then right turn). The three keys are
// compared in that order; requests that tie on all three go to the lower
// index. The winner is found by a binary tree of pairwise comparators, the
// structure the design description suggests for a low-latency priority
// module. Purely combinational: gnt_valid/gnt_idx/gnt_onehot follow req in
// the same cycle.
module prio_arbiter
  import sharp_pkg::*;
#(
  parameter int N = 5
) (
  input  arb_req_t         req [N],
  output logic             gnt_valid,
  output logic [$clog2(N > 1 ? N : 2)-1:0] gnt_idx,
  output logic [N-1:0]     gnt_onehot
);

  localparam int IW = $clog2(N > 1 ? N : 2);
  localparam int LEAVES = 1 << IW;   // tree width, a power of two

  // node[k] for k in [1, 2*LEAVES): heap-ordered tree, leaves at LEAVES..
  arb_req_t         node_req [2*LEAVES];
  logic [IW-1:0]    node_idx [2*LEAVES];

  always_comb begin
    for (int k = 0; k < 2 * LEAVES; k++) begin
      node_req[k] = '0;
      node_idx[k] = '0;
    end
    for (int k = 0; k < LEAVES; k++) begin
      node_idx[LEAVES+k] = IW'(k);
      if (k < N) node_req[LEAVES+k] = req[k];
    end
    for (int k = LEAVES - 1; k >= 1; k--) begin
      // the right child wins only if it strictly beats the left one
      if (req_beats(node_req[2*k+1], node_req[2*k])) begin
        node_req[k] = node_req[2*k+1];
        node_idx[k] = node_idx[2*k+1];
      end else begin
        node_req[k] = node_req[2*k];
        node_idx[k] = node_idx[2*k];
      end
    end
  end

  assign gnt_valid = node_req[1].valid;
  assign gnt_idx   = node_idx[1];

  always_comb begin
    gnt_onehot = '0;
    if (gnt_valid) gnt_onehot[gnt_idx] = 1'b1;
  end

endmodule
