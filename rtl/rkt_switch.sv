// rkt_switch: four-port reliable router (RKT-switch) of the mesh.
//
// Each side (N, E, S, W) has a loopback module facing the link, an input
// port (DMC check and correction, routing error detection, two-packet input
// buffer, routing logic) and an output port (output buffer, finite state
// machine, DMC encoder). There is no local port: modules attach to any side
// of a router at the edge of the mesh. The control logic arbitrates the
// crossbar between input and output ports, and the error journal keeps the
// data and routing error history of every side.
//
// Packets are PKT_FLITS flits of 32 data bits; each link carries 68-bit
// DMC codewords. Flow control is per packet: a sender starts a packet only
// when the receiver's occ is low and sends the next one only after Ack (or
// sends it again after Nack).
//
// A side is not used for routing when no router is there (nbr_router low),
// when the neighbour is marked unavailable from outside (nbr_unavail, e.g.
// a region being reconfigured), when the journal has found a permanent
// fault on that side (port_disable), or when the neighbour's journal has
// disabled the shared link (nbr_disable, the neighbour's port_disable). In the last two cases the loopback module of that
// side loops the output buffer back into the router, so no packet stays
// trapped. diag_unavail gives the state of the four diagonal neighbours to
// the routing error detection. inj_route_fault makes the routing logic of
// all inputs faulty, for validation of the detection.
//
// Minimum latency, first flit in on a link to first flit out on another,
// with no contention: 15 cycles for 4-flit packets (loopback in 1, DMC
// check 2, rest of the packet 3, commit 1, routing 1, crossbar 4, output
// state machine start 1, output register 1, loopback out 1). The
// document's figure is 9 (= flits + ECC + 3); the difference is the
// crossbar transfer into the output buffer (a second store-and-forward
// step, needed so the loopback and Nack resend can replay a packet) and the
// registered output state machine.
// rst_n is an asynchronous reset everywhere; lint also sees it sampled at
// the clock because the handshake assertions of the sub-blocks use it in
// their disable condition, which is not logic and is not synthesized.
module rkt_switch
  import rkt_pkg::*;
#(
  parameter int unsigned PKT_FLITS = 4,
  parameter int unsigned IN_PKTS   = 2,
  parameter int unsigned OUT_PKTS  = 2,
  parameter int unsigned THRESH    = 3
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [COORD_W-1:0] my_x,
  input  logic [COORD_W-1:0] my_y,
  input  link_fwd_t          link_in  [NPORTS],
  output link_bwd_t          bwd_out  [NPORTS],
  output link_fwd_t          link_out [NPORTS],
  input  link_bwd_t          bwd_in   [NPORTS],
  input  logic [NPORTS-1:0]  nbr_router,
  input  logic [NPORTS-1:0]  nbr_unavail,
  input  logic [NPORTS-1:0]  nbr_disable,   // the neighbour disabled the shared link
  input  logic [3:0]         diag_unavail,
  input  logic               inj_route_fault,
  input  logic               journal_clear,
  output logic [NPORTS-1:0]  port_disable,
  output logic [NPORTS-1:0]  perm_bus,
  output logic [NPORTS-1:0]  perm_port,
  output logic [NPORTS-1:0]  perm_route,
  output logic [NPORTS-1:0]  loop_mode,
  output logic [NPORTS-1:0]  ev_data_err,
  output logic [NPORTS-1:0]  ev_route_err,
  output logic [NPORTS-1:0]  ev_resend,
  output logic [NPORTS-1:0]  ev_uncorr,
  output logic [NPORTS-1:0]  ev_bypass
);

  link_fwd_t         rtr_in  [NPORTS];
  link_fwd_t         rtr_out [NPORTS];
  link_bwd_t         in_bwd  [NPORTS];
  link_bwd_t         out_bwd [NPORTS];

  logic [NPORTS-1:0] req, xfer, out_room, out_wr, out_last, sending;
  dir_e              req_port [NPORTS];
  logic [DATA_W-1:0] in_data  [NPORTS];
  logic [DATA_W-1:0] out_data [NPORTS];

  logic [NPORTS-1:0] ev_pkt, ev_looped, ev_sent_unused;
  logic [NPORTS-1:0] side_unavail, avail;
  logic [7:0]        err_cnt_unused [NPORTS];

  assign side_unavail = nbr_unavail | nbr_disable | port_disable;
  assign avail        = nbr_router & ~side_unavail;

  for (genvar p = 0; p < NPORTS; p++) begin : g_port
    loopback_module u_lb (
      .clk, .rst_n,
      .unavailable_in(side_unavail[p]),
      .rtr_data_out(rtr_out[p]), .rtr_req_out(sending[p]), .rtr_data_in(rtr_in[p]),
      .rtr_bwd_in(in_bwd[p]),    .rtr_bwd_out(out_bwd[p]),
      .link_data_out(link_out[p]), .link_data_in(link_in[p]),
      .link_bwd_out(bwd_out[p]),   .link_bwd_in(bwd_in[p]),
      .loop_mode(loop_mode[p])
    );

    input_port #(.PORT(dir_e'(p)), .PKT_FLITS(PKT_FLITS), .IN_PKTS(IN_PKTS)) u_in (
      .clk, .rst_n, .my_x, .my_y,
      .link_in(rtr_in[p]), .bwd_out(in_bwd[p]),
      .loop_mode(loop_mode[p]), .from_router(nbr_router[p]),
      .diag_unavail, .avail, .inj_route_fault,
      .req(req[p]), .req_port(req_port[p]),
      .xfer(xfer[p]), .xfer_data(in_data[p]),
      .ev_pkt(ev_pkt[p]), .ev_data_err(ev_data_err[p]), .ev_uncorr(ev_uncorr[p]),
      .ev_route_err(ev_route_err[p]), .ev_looped(ev_looped[p]),
      .ev_bypass(ev_bypass[p])
    );

    output_port #(.PKT_FLITS(PKT_FLITS), .OUT_PKTS(OUT_PKTS)) u_out (
      .clk, .rst_n,
      .wr_en(out_wr[p]), .wr_data(out_data[p]), .wr_last(out_last[p]),
      .has_room(out_room[p]), .sending(sending[p]),
      .fwd_out(rtr_out[p]), .bwd_in(out_bwd[p]),
      .ev_sent(ev_sent_unused[p]), .ev_resend(ev_resend[p])
    );
  end

  rkt_control #(.PKT_FLITS(PKT_FLITS)) u_ctl (
    .clk, .rst_n,
    .req, .req_port, .in_data, .xfer,
    .out_room, .out_wr, .out_last, .out_data
  );

  error_journal #(.THRESH(THRESH), .CNT_W(8)) u_jnl (
    .clk, .rst_n, .clear(journal_clear),
    .ev_pkt, .ev_data_err, .ev_route_err, .ev_looped,
    .perm_bus, .perm_port, .perm_route, .port_disable,
    .err_cnt(err_cnt_unused)
  );

endmodule
