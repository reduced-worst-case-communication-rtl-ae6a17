// sharp_mesh: a MESH_X x MESH_Y mesh network-on-chip of priority-preemptive
// SHARP routers with one processing element (PE) port per router.
//
// Router (x, y) has node number y * MESH_X + x. Its east output drives the
// west input of router (x+1, y), its south output the north input of router
// (x, y+1), and so on; in the other direction each router receives the
// registered status of its neighbours' input ports (VC reservations and
// full/empty flags, the credits). Links at the mesh edge are tied off: their
// inputs never carry a flit and their status reports every VC reserved and
// full, although XY routing never sends a flit there.
//
// A flit injected at node s with destination d follows the XY route and
// crosses up to HPC_MAX links per clock cycle; in an idle network a packet of
// L flits over h links is ejected, tail flit last, 2 * ceil(h / HPC_MAX) +
// (L - 1) cycles after its head flit is accepted (2 cycles when h = 0).
//
// Interface, per node n: inj_valid/inj_flit/inj_ready (a flit is accepted at
// a clock edge where both valid and ready are high; the PE sets the flit's
// source, destination, priority, packet id and release time stamp),
// ej_valid/ej_flit (the PE always accepts), ev (per-cycle event counts).
// The mesh size, HPC_MAX = 6 and the 2-flit VC depth are the defaults the
// design is evaluated with (8 x 8, 10 x 10 and 16 x 16 meshes, HPC_MAX of 4
// and 6, 2 or 32 flits per VC are also evaluated).
//
// The bypass paths of neighbouring routers are joined combinationally; XY
// routing keeps them free of cycles, although a lint tool that treats the
// link arrays as single signals may report a combinational loop.
module sharp_mesh
  import sharp_pkg::*;
#(
  parameter int MESH_X  = 8,
  parameter int MESH_Y  = 8,
  parameter int HPC_MAX = 6,
  parameter int BUFF    = 2,
  parameter int NNODE   = MESH_X * MESH_Y
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       inj_valid [NNODE],
  input  flit_t      inj_flit  [NNODE],
  output logic       inj_ready [NNODE],
  output logic       ej_valid  [NNODE],
  output flit_t      ej_flit   [NNODE],
  output router_ev_t ev        [NNODE]
);

  localparam int NVC = NUM_VC;

  link_t      lout [NNODE][NPORT];
  link_t      lin  [NNODE][NPORT];
  vc_status_t ust  [NNODE][NPORT][NVC];
  vc_status_t dst  [NNODE][NPORT][NVC];

  vc_status_t edge_st;
  assign edge_st = '{valid: 1'b1, prio: '0, src_x: '0, src_y: '0, pkt_id: '0,
                     full: 1'b1, empty: 1'b0};

  for (genvar y = 0; y < MESH_Y; y++) begin : g_y
    for (genvar x = 0; x < MESH_X; x++) begin : g_x
      localparam int N  = y * MESH_X + x;
      localparam bit HN = (y > 0);
      localparam bit HS = (y < MESH_Y - 1);
      localparam bit HE = (x < MESH_X - 1);
      localparam bit HW = (x > 0);
      localparam int NN = HN ? N - MESH_X : N;
      localparam int NS = HS ? N + MESH_X : N;
      localparam int NE = HE ? N + 1 : N;
      localparam int NW = HW ? N - 1 : N;

      // links into this router: a neighbour's output facing us
      assign lin[N][P_LOCAL] = '0;
      assign lin[N][P_NORTH] = HN ? lout[NN][P_SOUTH] : '0;
      assign lin[N][P_SOUTH] = HS ? lout[NS][P_NORTH] : '0;
      assign lin[N][P_EAST]  = HE ? lout[NE][P_WEST]  : '0;
      assign lin[N][P_WEST]  = HW ? lout[NW][P_EAST]  : '0;

      // status of the input port each output feeds
      for (genvar v = 0; v < NVC; v++) begin : g_v
        assign dst[N][P_LOCAL][v] = edge_st;
        assign dst[N][P_NORTH][v] = HN ? ust[NN][P_SOUTH][v] : edge_st;
        assign dst[N][P_SOUTH][v] = HS ? ust[NS][P_NORTH][v] : edge_st;
        assign dst[N][P_EAST][v]  = HE ? ust[NE][P_WEST][v]  : edge_st;
        assign dst[N][P_WEST][v]  = HW ? ust[NW][P_EAST][v]  : edge_st;
      end

      sharp_router #(.HPC_MAX(HPC_MAX), .BUFF(BUFF)) u_rt (
        .clk, .rst_n,
        .my_x     (COORD_W'(x)),
        .my_y     (COORD_W'(y)),
        .link_in  (lin[N]),
        .link_out (lout[N]),
        .ds_status(dst[N]),
        .us_status(ust[N]),
        .inj_valid(inj_valid[N]),
        .inj_flit (inj_flit[N]),
        .inj_ready(inj_ready[N]),
        .ej_valid (ej_valid[N]),
        .ej_flit  (ej_flit[N]),
        .ev       (ev[N])
      );
    end
  end

endmodule
