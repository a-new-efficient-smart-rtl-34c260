// rkt_noc: the RKT network-on-chip, a W x H mesh of RKT-switches.
//
// Routers are at (x, y), x = 0..W-1 from West to East, y = 0..H-1 from South
// to North; router (x, y) is instance n = y*W + x. Neighbouring routers are
// joined by a pair of links. The free sides of the routers on the edge of the
// mesh are the module ports: 2W+2H of them (16 for the 4x4 mesh), numbered
// North edge x = 0..W-1, then East edge y = 0..H-1, South edge x = 0..W-1,
// West edge y = 0..H-1. A module addresses a packet to the router it sits
// next to and the side it sits on (header fields dst_x, dst_y, dst_port).
//
// node_unavail marks routers as unavailable (a faulty router, or a region
// being reconfigured for a new module). Their neighbours stop routing to
// them, loop back what they hold for them, and tell the routing error
// detection of the routers around through the diagonal indications. A link
// that the error journal of either router on it disables is dropped by both.
// inj_route_fault and inj_link_en/inj_link_mask are fault-injection inputs
// for validation: the first makes a router's routing logic wrong, the second
// XORs a mask into every codeword leaving router n by side p.
// The mesh, the edge-attached modules and the module counts follow the
// document; the numbering and the injection inputs are this design's.
module rkt_noc
  import rkt_pkg::*;
#(
  parameter int unsigned W         = 4,
  parameter int unsigned H         = 4,
  parameter int unsigned PKT_FLITS = 4,
  parameter int unsigned IN_PKTS   = 2,
  parameter int unsigned OUT_PKTS  = 2,
  parameter int unsigned THRESH    = 3,
  localparam int unsigned NODES    = W * H,
  localparam int unsigned NMOD     = 2 * W + 2 * H
) (
  input  logic              clk,
  input  logic              rst_n,
  // module ports on the edge of the mesh
  input  link_fwd_t         mod_in      [NMOD],
  output link_bwd_t         mod_in_bwd  [NMOD],
  output link_fwd_t         mod_out     [NMOD],
  input  link_bwd_t         mod_out_bwd [NMOD],
  // availability and fault injection
  input  logic [NODES-1:0]  node_unavail,
  input  logic [NODES-1:0]  inj_route_fault,
  input  logic [NPORTS-1:0] inj_link_en [NODES],
  input  logic [CW_W-1:0]   inj_link_mask,
  input  logic              journal_clear,
  // status per router and side
  output logic [NPORTS-1:0] port_disable [NODES],
  output logic [NPORTS-1:0] perm_bus     [NODES],
  output logic [NPORTS-1:0] perm_port    [NODES],
  output logic [NPORTS-1:0] perm_route   [NODES],
  output logic [NPORTS-1:0] loop_mode    [NODES],
  output logic [NPORTS-1:0] ev_data_err  [NODES],
  output logic [NPORTS-1:0] ev_route_err [NODES],
  output logic [NPORTS-1:0] ev_resend    [NODES],
  output logic [NPORTS-1:0] ev_uncorr    [NODES],
  output logic [NPORTS-1:0] ev_bypass    [NODES]
);

  link_fwd_t l_in  [NODES][NPORTS];
  link_fwd_t l_out [NODES][NPORTS];
  link_bwd_t b_in  [NODES][NPORTS];
  link_bwd_t b_out [NODES][NPORTS];

  function automatic int unsigned node(int x, int y);
    return y * W + x;
  endfunction

  for (genvar y = 0; y < H; y++) begin : g_y
    for (genvar x = 0; x < W; x++) begin : g_x
      localparam int unsigned N = y * W + x;
      // neighbours: does one exist on each side
      localparam bit HAS_N = (y < H - 1);
      localparam bit HAS_E = (x < W - 1);
      localparam bit HAS_S = (y > 0);
      localparam bit HAS_W = (x > 0);
      localparam bit [3:0] HAS = {HAS_W, HAS_S, HAS_E, HAS_N};

      logic [NPORTS-1:0] nbr_unavail;
      logic [NPORTS-1:0] nbr_disable;
      logic [3:0]        diag_unavail;

      assign nbr_unavail[0] = HAS_N ? node_unavail[node(x, y + 1)] : 1'b0;
      assign nbr_unavail[1] = HAS_E ? node_unavail[node(x + 1, y)] : 1'b0;
      assign nbr_unavail[2] = HAS_S ? node_unavail[node(x, y - 1)] : 1'b0;
      assign nbr_unavail[3] = HAS_W ? node_unavail[node(x - 1, y)] : 1'b0;
      // Diagonal indication k (NE, SE, SW, NW): the diagonal router D is out
      // of service for the routers between it and this one when it is
      // unavailable, has disabled a side, or one of those two routers (the
      // vertical neighbour V and the horizontal neighbour Hn) disabled its
      // side facing D. A missing diagonal router counts as unavailable.
      for (genvar k = 0; k < 4; k++) begin : g_diag
        localparam int DX = (k == 0 || k == 1) ? 1 : -1;
        localparam int DY = (k == 0 || k == 3) ? 1 : -1;
        localparam bit HAS_D = ((DY > 0) ? HAS_N : HAS_S) && ((DX > 0) ? HAS_E : HAS_W);
        if (HAS_D) begin : g_d
          localparam int unsigned D  = node(x + DX, y + DY);
          localparam int unsigned V  = node(x, y + DY);
          localparam int unsigned HN = node(x + DX, y);
          localparam int unsigned SV = (DX > 0) ? 1 : 3;  // side of V facing D
          localparam int unsigned SH = (DY > 0) ? 0 : 2;  // side of Hn facing D
          assign diag_unavail[k] = node_unavail[D] | (|port_disable[D]) |
                                   port_disable[V][SV] | port_disable[HN][SH];
        end else begin : g_none
          assign diag_unavail[k] = 1'b1;
        end
      end

      for (genvar p = 0; p < NPORTS; p++) begin : g_side
        if (HAS[p]) begin : g_link
          // neighbour on side p and the side it sees this router on
          localparam int unsigned NX = (p == 1) ? x + 1 : (p == 3) ? x - 1 : x;
          localparam int unsigned NY = (p == 0) ? y + 1 : (p == 2) ? y - 1 : y;
          localparam int unsigned M  = NY * W + NX;
          localparam int unsigned Q  = p ^ 2;
          always_comb begin
            l_in[N][p]    = l_out[M][Q];
            l_in[N][p].cw = l_out[M][Q].cw ^ (inj_link_en[M][Q] ? inj_link_mask : '0);
          end
          assign b_in[N][p] = b_out[M][Q];
          assign nbr_disable[p] = port_disable[M][Q];
        end else begin : g_edge
          localparam int unsigned K = (p == 0) ? x : (p == 1) ? W + y :
                                      (p == 2) ? W + H + x : 2 * W + H + y;
          always_comb begin
            l_in[N][p]    = mod_in[K];
            l_in[N][p].cw = mod_in[K].cw ^ (inj_link_en[N][p] ? inj_link_mask : '0);
          end
          assign b_in[N][p]       = mod_out_bwd[K];
          assign mod_out[K]       = l_out[N][p];
          assign mod_in_bwd[K]    = b_out[N][p];
          assign nbr_disable[p]   = 1'b0;
        end
      end

      rkt_switch #(
        .PKT_FLITS(PKT_FLITS), .IN_PKTS(IN_PKTS), .OUT_PKTS(OUT_PKTS), .THRESH(THRESH)
      ) u_sw (
        .clk, .rst_n,
        .my_x(COORD_W'(x)), .my_y(COORD_W'(y)),
        .link_in(l_in[N]), .bwd_out(b_out[N]),
        .link_out(l_out[N]), .bwd_in(b_in[N]),
        .nbr_router(HAS), .nbr_unavail, .nbr_disable, .diag_unavail,
        .inj_route_fault(inj_route_fault[N]),
        .journal_clear,
        .port_disable(port_disable[N]), .perm_bus(perm_bus[N]),
        .perm_port(perm_port[N]), .perm_route(perm_route[N]),
        .loop_mode(loop_mode[N]),
        .ev_data_err(ev_data_err[N]), .ev_route_err(ev_route_err[N]),
        .ev_resend(ev_resend[N]), .ev_uncorr(ev_uncorr[N]),
        .ev_bypass(ev_bypass[N])
      );
    end
  end

endmodule
