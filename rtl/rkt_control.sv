// rkt_control: control logic and crossbar of the router.
//
// Each output port has a round-robin arbiter over the four input ports.
// An input that holds a routed, complete packet raises req with the chosen
// req_port; the arbiter of that output grants one such input when the output
// buffer has room for a whole packet, and then the input streams the packet
// through the crossbar, one flit per cycle for PKT_FLITS cycles (xfer high),
// into the output buffer (out_wr, with out_last on the final flit). Grant
// and the first flit happen in the same cycle. The document shows a central
// control logic connected to all ports but gives no arbitration rule; round
// robin is this design's choice.
module rkt_control
  import rkt_pkg::*;
#(
  parameter int unsigned PKT_FLITS = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NPORTS-1:0] req,
  input  dir_e              req_port [NPORTS],
  input  logic [DATA_W-1:0] in_data  [NPORTS],
  output logic [NPORTS-1:0] xfer,
  input  logic [NPORTS-1:0] out_room,
  output logic [NPORTS-1:0] out_wr,
  output logic [NPORTS-1:0] out_last,
  output logic [DATA_W-1:0] out_data [NPORTS]
);

  localparam int unsigned FCW = $clog2(PKT_FLITS);

  logic [NPORTS-1:0] busy;
  logic [1:0]        owner [NPORTS];
  logic [FCW-1:0]    cnt   [NPORTS];
  logic [1:0]        rr    [NPORTS];   // input with highest priority next

  logic [NPORTS-1:0] win_valid;
  logic [1:0]        win   [NPORTS];
  logic [1:0]        src   [NPORTS];

  logic [1:0] cand;
  always_comb begin
    xfer = '0;
    cand = '0;
    for (int o = 0; o < NPORTS; o++) begin
      win_valid[o] = 1'b0;
      win[o]       = rr[o];
      if (!busy[o] && out_room[o]) begin
        for (int k = NPORTS-1; k >= 0; k--) begin
          cand = rr[o] + 2'(k);
          if (req[cand] && req_port[cand] == dir_e'(o)) begin
            win_valid[o] = 1'b1;
            win[o]       = cand;
          end
        end
      end
      src[o]      = busy[o] ? owner[o] : win[o];
      out_wr[o]   = busy[o] || win_valid[o];
      out_last[o] = out_wr[o] && (busy[o] ? (cnt[o] == FCW'(PKT_FLITS-1))
                                          : (PKT_FLITS == 1));
      out_data[o] = in_data[src[o]];
      if (out_wr[o]) xfer[src[o]] = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= '0;
      for (int o = 0; o < NPORTS; o++) begin
        owner[o] <= '0;
        cnt[o]   <= '0;
        rr[o]    <= '0;
      end
    end else begin
      for (int o = 0; o < NPORTS; o++) begin
        if (win_valid[o]) begin
          busy[o]  <= (PKT_FLITS > 1);
          owner[o] <= win[o];
          cnt[o]   <= FCW'(1);
          rr[o]    <= win[o] + 2'd1;
        end else if (busy[o]) begin
          cnt[o] <= cnt[o] + 1'b1;
          if (cnt[o] == FCW'(PKT_FLITS-1)) busy[o] <= 1'b0;
        end
      end
    end
  end

  // no input is granted by two outputs at once
  for (genvar a = 0; a < NPORTS; a++) begin : g_chk
    for (genvar b = a + 1; b < NPORTS; b++) begin : g_pair
      assert property (@(posedge clk) disable iff (!rst_n)
        !(out_wr[a] && out_wr[b] && src[a] == src[b]))
        else $error("rkt_control: input granted twice");
    end
  end

endmodule
