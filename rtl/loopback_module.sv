// loopback_module: sits between one side of the router and its link.
//
// Normal mode: flits from the router's output buffer cross a one-register
// buffer to the link (Data_out), flits from the link cross a one-register
// buffer into the router's input port (Data_in), and the handshake signals
// pass straight through. Loopback mode (neighbour on this side unavailable):
// the semi-crossbar turns the router's outgoing flits back into the mux in
// front of the input buffer (Data_loopback), so the packets stored in the
// output buffer re-enter the router by the same side and are routed again
// to another side; the Ack/Nack and occupancy of the router's own input
// port are returned to its output port, and the link sees the port as
// occupied (Occ_out is the router's occupancy or loopback mode).
//
// The logic control changes mode only between packets: while a change is
// pending it shows the router's output port an occupied receiver, and it
// switches once that port is not sending (Data_request_out low), no flit
// is on either path and a packet received from the link has had its
// Ack/Nack. Before looping, the link is also shown Occ for GUARD cycles so
// that a packet the neighbour has just decided to send arrives (and is
// acknowledged) before the switch. A packet already sent over the link gets ACK_WAIT
// cycles for its Ack/Nack before the switch; if none arrives (dead
// neighbour) the switch gives that output a Nack, so the packet is resent
// through the loopback path instead of being lost. Leaving
// loopback mode waits until the last looped packet was acknowledged.
//
// The block structure (mux, semi-crossbar, two buffers, logic control, the
// OR on Occ_out) is the document's. Here Data_request_out from the router
// says its output port is sending, Data_request_in carries the Ack/Nack
// pulses back to it; the mode-change rules are this design's. The figure's
// Id_in input has no described role and is not used.
//
// Timing: one cycle in each direction of data, handshakes combinational.
module loopback_module
  import rkt_pkg::*;
#(
  parameter int unsigned ACK_WAIT = 24,  // cycles to wait for a last Ack/Nack
  parameter int unsigned GUARD    = 4    // cycles the link is shown Occ before looping
)
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      unavailable_in,  // neighbour on this side unavailable
  // router side
  input  link_fwd_t rtr_data_out,    // from the router's output port
  input  logic      rtr_req_out,     // the router's output port is sending a packet
  output link_fwd_t rtr_data_in,     // to the router's input port
  input  link_bwd_t rtr_bwd_in,      // Ack/Nack/Occ of the router's input port
  output link_bwd_t rtr_bwd_out,     // Ack/Nack/Occ to the router's output port
  // link side
  output link_fwd_t link_data_out,
  input  link_fwd_t link_data_in,
  output link_bwd_t link_bwd_out,    // to the neighbour's output port
  input  link_bwd_t link_bwd_in,     // from the neighbour's input port
  output logic      loop_mode
);

  link_fwd_t out_buf, in_buf;
  logic      outstanding;   // packet sent by the router, Ack/Nack not yet back
  logic      incoming;      // packet received from the link, Ack/Nack not yet sent
  logic      idle, pending, to_loop, to_norm, waited;
  localparam int unsigned WC_W = $clog2(ACK_WAIT + 1);
  logic [WC_W-1:0] wait_cnt;

  // a mode change is pending: hold the router's output port (occ) until
  // it is between packets
  assign pending = (unavailable_in != loop_mode);
  assign idle    = !rtr_req_out && !rtr_data_out.valid && !link_data_in.valid &&
                   !out_buf.valid && !in_buf.valid && !incoming;
  // before looping, a packet already sent gets ACK_WAIT cycles for its
  // Ack/Nack so that a delivered packet is not sent a second time
  assign waited  = (wait_cnt >= WC_W'(GUARD)) &&
                   (!outstanding || (wait_cnt == WC_W'(ACK_WAIT)));
  assign to_loop = !loop_mode && unavailable_in && idle && waited;
  assign to_norm =  loop_mode && !unavailable_in && idle && !outstanding;

  always_comb begin
    if (loop_mode) begin
      rtr_bwd_out  = rtr_bwd_in;
      link_bwd_out = '{occ: 1'b1, ack: 1'b0, nack: 1'b0};
    end else begin
      rtr_bwd_out  = link_bwd_in;
      link_bwd_out = rtr_bwd_in;
      // a packet still waiting for the dead neighbour is sent again
      if (to_loop && outstanding && !link_bwd_in.ack && !link_bwd_in.nack)
        rtr_bwd_out.nack = 1'b1;
    end
    if (pending) begin
      rtr_bwd_out.occ  = 1'b1;
      link_bwd_out.occ = 1'b1;
    end
  end

  assign link_data_out = out_buf;
  assign rtr_data_in   = in_buf;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      loop_mode   <= 1'b0;
      outstanding <= 1'b0;
      incoming    <= 1'b0;
      wait_cnt    <= '0;
      out_buf     <= '0;
      in_buf      <= '0;
    end else begin
      if (to_loop)      loop_mode <= 1'b1;
      else if (to_norm) loop_mode <= 1'b0;

      // cycles since the change to loopback became pending (saturating)
      if (!loop_mode && unavailable_in) begin
        if (wait_cnt != WC_W'(ACK_WAIT)) wait_cnt <= wait_cnt + 1'b1;
      end else begin
        wait_cnt <= '0;
      end

      if (!loop_mode && link_data_in.valid)             incoming <= 1'b1;
      else if (rtr_bwd_in.ack || rtr_bwd_in.nack)      incoming <= 1'b0;

      if (rtr_data_out.valid)                      outstanding <= 1'b1;
      else if (rtr_bwd_out.ack || rtr_bwd_out.nack) outstanding <= 1'b0;

      // semi-crossbar: to the link buffer or back into the input mux
      out_buf <= loop_mode ? '0 : rtr_data_out;
      in_buf  <= loop_mode ? rtr_data_out : link_data_in;
    end
  end

endmodule
