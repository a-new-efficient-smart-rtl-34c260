// ip_model: behavioural model of a communication module (PE or IP) attached
// to one side of a router, for testbenches only.
//
// Sending: packets handed over on push/push_pkt are queued. The model starts
// a packet when the router's occ is low, drives its PKT_FLITS flits on
// consecutive cycles as DMC codewords (check bits computed here with
// integer symbol sums and row XOR), then waits for Ack (next packet) or
// Nack (same packet again). If corrupt_next is set when a packet is pushed,
// corrupt_mask is XORed into its first codeword the first time it is sent.
// Receiving: flits are collected into packets; a packet whose codewords are
// all consistent is acknowledged and shown for one cycle on got/got_pkt,
// otherwise it is refused with a Nack. With busy_pct > 0 the model raises
// occ at random, which makes the router stall; hold keeps occ raised.
module ip_model
  import rkt_pkg::*;
#(
  parameter int unsigned PKT_FLITS = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              push,
  input  logic [DATA_W-1:0] push_pkt [PKT_FLITS],
  input  logic              corrupt_next,
  input  logic [CW_W-1:0]   corrupt_mask,
  input  int                busy_pct,   // chance in percent of raising occ per cycle
  input  logic              hold,       // keep occ raised
  output int                pending,
  output link_fwd_t         tx,
  input  link_bwd_t         tx_bwd,
  input  link_fwd_t         rx,
  output link_bwd_t         rx_bwd,
  output logic              got,
  output logic [DATA_W-1:0] got_pkt [PKT_FLITS],
  output int                n_nack_rx,  // Nacks received for sent packets
  output int                n_stall     // cycles with occ raised
);

  function automatic logic [CW_W-1:0] enc(logic [DATA_W-1:0] d);
    logic [H_W-1:0] h;
    int pa[4] = '{0, 1, 4, 5};
    for (int g = 0; g < 4; g++)
      h[5*g +: 5] = 5'(int'(d[4*pa[g] +: 4]) + int'(d[4*(pa[g]+2) +: 4]));
    return {d[15:0] ^ d[31:16], h, d};
  endfunction

  typedef logic [DATA_W-1:0] pkt_t [PKT_FLITS];
  pkt_t q[$];
  bit   qc[$];   // corrupt the first send of this packet
  int   idx;
  bit   sending, waiting, corrupt_this;

  assign pending = q.size() + ((sending || waiting) ? 1 : 0);

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q.delete();
      qc.delete();
      tx        <= '0;
      sending    = 0;
      waiting    = 0;
      idx        = 0;
      n_nack_rx <= 0;
      corrupt_this = 0;
    end else begin
      if (push) begin
        q.push_back(push_pkt);
        qc.push_back(corrupt_next);
      end
      tx <= '0;
      if (waiting) begin
        if (tx_bwd.ack) begin
          waiting = 0;
          void'(q.pop_front());
          void'(qc.pop_front());
        end else if (tx_bwd.nack) begin
          waiting = 0;
          n_nack_rx <= n_nack_rx + 1;
        end
      end else if (sending) begin
        tx.valid <= 1'b1;
        tx.cw    <= enc(q[0][idx]) ^ ((idx == 0 && corrupt_this) ? corrupt_mask : '0);
        if (idx == PKT_FLITS - 1) begin
          sending = 0;
          waiting = 1;
          corrupt_this = 0;
        end
        idx++;
      end else if (q.size() > 0 && !tx_bwd.occ) begin
        sending = 1;
        idx     = 1;
        corrupt_this = qc[0];
        qc[0]        = 0;
        tx.valid <= 1'b1;
        tx.cw    <= enc(q[0][0]) ^ (corrupt_this ? corrupt_mask : '0);
        if (PKT_FLITS == 1) begin sending = 0; waiting = 1; end
      end
    end
  end

  // receiver
  int   ridx;
  bit   rbad;
  pkt_t rbuf;
  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ridx    = 0;
      rbad    = 0;
      rx_bwd  <= '0;
      got     <= 1'b0;
      n_stall <= 0;
      for (int k = 0; k < PKT_FLITS; k++) got_pkt[k] <= '0;
    end else begin
      rx_bwd.ack  <= 1'b0;
      rx_bwd.nack <= 1'b0;
      got         <= 1'b0;
      rx_bwd.occ  <= hold || ((busy_pct > 0) && ($urandom_range(0, 99) < busy_pct));
      if (rx_bwd.occ) n_stall <= n_stall + 1;
      if (rx.valid) begin
        rbuf[ridx] = rx.cw[DATA_W-1:0];
        if (enc(rx.cw[DATA_W-1:0]) != rx.cw) rbad = 1;
        if (ridx == PKT_FLITS - 1) begin
          if (rbad) rx_bwd.nack <= 1'b1;
          else begin
            rx_bwd.ack <= 1'b1;
            got        <= 1'b1;
            for (int k = 0; k < PKT_FLITS; k++) got_pkt[k] <= rbuf[k];
          end
          ridx = 0;
          rbad = 0;
        end else ridx++;
      end
    end
  end

endmodule
