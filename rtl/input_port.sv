// input_port: receiving side of one router port.
//
// Codewords from the loopback module go through the two-stage DMC decoder
// and, corrected, into a packet_fifo that holds IN_PKTS packets of
// PKT_FLITS flits. A packet becomes visible to the routing stage only when
// all its flits are in (store-and-forward). At the last flit the port
// returns an Ack, or a Nack and drops the packet if a flit could not be
// corrected; the sender then sends the packet again. In parallel with the
// buffering, the header is given to route_err_detect, so the routing check
// of the previous router adds no latency.
//
// Routing stage: when a whole packet waits at the head of the buffer,
// route_logic chooses an output from the header; the choice is registered
// (one cycle) and presented to the router's control logic as req/req_port.
// When the control logic grants, xfer is high for PKT_FLITS cycles and the
// port presents one flit per cycle on xfer_data, the header with its bypass
// and turn flags rewritten.
//
// Per-packet reports for the error journal (one-cycle pulses at the last
// flit): ev_pkt, ev_data_err (a flit had a DMC syndrome), ev_uncorr,
// ev_route_err, ev_looped (the packet came through the loopback path);
// ev_bypass pulses when a packet leaves this input off its XY path.
// Buffer size, the per-port DMC check, routing logic and routing error
// detection follow the document; the Ack/Nack timing is this design's.
module input_port
  import rkt_pkg::*;
#(
  parameter dir_e        PORT      = DIR_N,
  parameter int unsigned PKT_FLITS = 4,
  parameter int unsigned IN_PKTS   = 2
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [COORD_W-1:0] my_x,
  input  logic [COORD_W-1:0] my_y,
  input  link_fwd_t          link_in,
  output link_bwd_t          bwd_out,
  input  logic               loop_mode,
  input  logic               from_router,   // a router (not a module) is on this side
  input  logic [3:0]         diag_unavail,
  input  logic [NPORTS-1:0]  avail,
  input  logic               inj_route_fault,
  output logic               req,
  output dir_e               req_port,
  input  logic               xfer,
  output logic [DATA_W-1:0]  xfer_data,
  output logic               ev_pkt,
  output logic               ev_data_err,
  output logic               ev_uncorr,
  output logic               ev_route_err,
  output logic               ev_looped,
  output logic               ev_bypass     // a packet left this input off its XY path
);

  localparam int unsigned DEPTH = PKT_FLITS * IN_PKTS;
  localparam int unsigned FCW   = $clog2(PKT_FLITS);
  localparam int unsigned NW    = $clog2(DEPTH+1);

  // ---------------- receive path ----------------
  logic              d_valid, d_err, d_corr_unused, d_uncorr;
  logic [DATA_W-1:0] d_data;

  dmc_decoder u_dec (
    .clk, .rst_n,
    .in_valid(link_in.valid), .in_cw(link_in.cw),
    .out_valid(d_valid), .out_data(d_data),
    .out_err(d_err), .out_corr(d_corr_unused), .out_uncorr(d_uncorr)
  );

  logic [FCW-1:0] rx_cnt;
  logic           rx_err_acc, rx_unc_acc, rx_rerr_acc;
  logic           rx_last;
  logic           rerr_now;

  route_err_detect u_red (
    .my_x, .my_y, .in_port(PORT), .hdr(hdr_t'(d_data)),
    .check_en(d_valid && (rx_cnt == '0) && from_router && !loop_mode),
    .diag_unavail, .err(rerr_now)
  );

  assign rx_last = d_valid && (rx_cnt == FCW'(PKT_FLITS-1));

  logic              wr_commit, wr_abort;
  logic              rd_en, rd_commit;
  logic [DATA_W-1:0] rd_data;
  logic [NW-1:0]     n_avail, n_free;

  assign wr_commit = rx_last && !(rx_unc_acc || d_uncorr);
  assign wr_abort  = rx_last &&  (rx_unc_acc || d_uncorr);

  packet_fifo #(.WIDTH(DATA_W), .DEPTH(DEPTH)) u_buf (
    .clk, .rst_n,
    .wr_en(d_valid), .wr_data(d_data), .wr_commit, .wr_abort,
    .rd_en, .rd_data, .rd_commit, .rd_rewind(1'b0),
    .n_avail, .n_free
  );

  logic ack_q, nack_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_cnt       <= '0;
      rx_err_acc   <= 1'b0;
      rx_unc_acc   <= 1'b0;
      rx_rerr_acc  <= 1'b0;
      ack_q        <= 1'b0;
      nack_q       <= 1'b0;
      ev_pkt       <= 1'b0;
      ev_data_err  <= 1'b0;
      ev_uncorr    <= 1'b0;
      ev_route_err <= 1'b0;
      ev_looped    <= 1'b0;
    end else begin
      ack_q        <= wr_commit;
      nack_q       <= wr_abort;
      ev_pkt       <= rx_last;
      ev_data_err  <= rx_last && (rx_err_acc || d_err);
      ev_uncorr    <= wr_abort;
      ev_route_err <= rx_last && rx_rerr_acc;
      ev_looped    <= rx_last && loop_mode;
      if (d_valid) begin
        if (rx_last) begin
          rx_cnt      <= '0;
          rx_err_acc  <= 1'b0;
          rx_unc_acc  <= 1'b0;
          rx_rerr_acc <= 1'b0;
        end else begin
          rx_cnt      <= rx_cnt + 1'b1;
          rx_err_acc  <= rx_err_acc || d_err;
          rx_unc_acc  <= rx_unc_acc || d_uncorr;
          rx_rerr_acc <= rx_rerr_acc || rerr_now;
        end
      end
    end
  end

  assign bwd_out = '{occ: (n_free < NW'(PKT_FLITS)), ack: ack_q, nack: nack_q};

  // ---------------- routing stage ----------------
  logic           r_valid, r_bypass;
  dir_e           r_port;
  logic           in_xfer;
  logic [FCW-1:0] tx_cnt;
  logic           bypass_q, turn_q, r_turn;

  route_logic u_rl (
    .my_x, .my_y, .hdr(hdr_t'(rd_data)), .in_port(PORT), .avail,
    .inj_fault(inj_route_fault),
    .out_valid(r_valid), .out_port(r_port), .bypass(r_bypass),
    .turn(r_turn)
  );

  assign rd_en     = xfer;
  assign ev_bypass = xfer && (tx_cnt == '0) && bypass_q;
  assign rd_commit = xfer && (tx_cnt == FCW'(PKT_FLITS-1));

  hdr_t hdr_out;
  always_comb begin
    hdr_out        = hdr_t'(rd_data);
    hdr_out.bypass = bypass_q;
    hdr_out.turn   = turn_q;
    xfer_data      = (tx_cnt == '0) ? DATA_W'(hdr_out) : rd_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      req      <= 1'b0;
      req_port <= DIR_N;
      bypass_q <= 1'b0;
      turn_q   <= 1'b0;
      in_xfer  <= 1'b0;
      tx_cnt   <= '0;
    end else begin
      if (xfer) begin
        req     <= 1'b0;
        in_xfer <= !rd_commit;
        tx_cnt  <= rd_commit ? '0 : tx_cnt + 1'b1;
      end else if (!in_xfer) begin
        // re-evaluated every cycle until granted
        req      <= (n_avail >= NW'(PKT_FLITS)) && r_valid;
        req_port <= r_port;
        bypass_q <= r_bypass;
        turn_q   <= r_turn;
      end
    end
  end

  // a transfer, once granted, runs for PKT_FLITS consecutive cycles
  assert property (@(posedge clk) disable iff (!rst_n) in_xfer |-> xfer)
    else $error("input_port: transfer interrupted");

endmodule
