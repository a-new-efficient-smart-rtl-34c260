// output_port: output buffer and finite state machine of one router port.
//
// The crossbar writes packets into a packet_fifo of OUT_PKTS packets; a
// packet is committed with its last flit. The state machine sends a packet
// when a whole one is buffered and the receiver is not occupied: it reads
// PKT_FLITS flits on consecutive cycles, DMC-encodes each and drives them
// on the link through an output register. It then waits for the
// receiver's Ack (the packet is freed) or Nack (the read pointer is moved
// back and the packet is sent again). Only one packet per link is in
// flight, which is the Ack/Nack flow control the document describes; the
// buffer depth and the exact states are this design's choices.
//
// Timing: first flit on fwd_out one cycle after the SEND state is entered.
module output_port
  import rkt_pkg::*;
#(
  parameter int unsigned PKT_FLITS = 4,
  parameter int unsigned OUT_PKTS  = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              wr_en,
  input  logic [DATA_W-1:0] wr_data,
  input  logic              wr_last,
  output logic              has_room,  // room for one more whole packet
  output logic              sending,   // a packet is being sent (Data_request_out)
  output link_fwd_t         fwd_out,
  input  link_bwd_t         bwd_in,
  output logic              ev_sent,   // a packet was acknowledged
  output logic              ev_resend  // a packet was negatively acknowledged
);

  localparam int unsigned DEPTH = PKT_FLITS * OUT_PKTS;
  localparam int unsigned FCW   = $clog2(PKT_FLITS);
  localparam int unsigned NW    = $clog2(DEPTH+1);

  typedef enum logic [1:0] {S_IDLE, S_SEND, S_WAIT} state_e;
  state_e state;

  logic [FCW-1:0]    cnt;
  logic              rd_en, rd_commit, rd_rewind;
  logic [DATA_W-1:0] rd_data;
  logic [NW-1:0]     n_avail, n_free;
  logic [CW_W-1:0]   enc_cw;
  logic [H_W-1:0]    enc_h_unused;
  logic [V_W-1:0]    enc_v_unused;

  packet_fifo #(.WIDTH(DATA_W), .DEPTH(DEPTH)) u_buf (
    .clk, .rst_n,
    .wr_en, .wr_data, .wr_commit(wr_last), .wr_abort(1'b0),
    .rd_en, .rd_data, .rd_commit, .rd_rewind,
    .n_avail, .n_free
  );

  dmc_encoder u_enc (.data(rd_data), .h(enc_h_unused), .v(enc_v_unused), .cw(enc_cw));

  assign has_room  = n_free >= NW'(PKT_FLITS);
  assign rd_en     = (state == S_SEND);
  assign rd_commit = (state == S_WAIT) && bwd_in.ack;
  assign rd_rewind = (state == S_WAIT) && !bwd_in.ack && bwd_in.nack;
  assign ev_sent   = rd_commit;
  assign ev_resend = rd_rewind;
  assign sending   = (state == S_SEND);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      cnt     <= '0;
      fwd_out <= '0;
    end else begin
      fwd_out.valid <= rd_en;
      fwd_out.cw    <= rd_en ? enc_cw : '0;
      unique case (state)
        S_IDLE: if (n_avail >= NW'(PKT_FLITS) && !bwd_in.occ) begin
          state <= S_SEND;
          cnt   <= '0;
        end
        S_SEND: begin
          cnt <= cnt + 1'b1;
          if (cnt == FCW'(PKT_FLITS-1)) state <= S_WAIT;
        end
        S_WAIT: if (bwd_in.ack || bwd_in.nack) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
