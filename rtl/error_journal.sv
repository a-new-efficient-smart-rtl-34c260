// error_journal: centralized journal of data packet and routing errors.
//
// For each of the four ports the journal keeps the history of the packets
// received there and classifies faults as transient or permanent: a fault
// is declared permanent when THRESH packets in a row on the same path show
// the same kind of error; an error followed by a clean packet stays
// transient. Three kinds are kept apart, which localizes the fault:
//   - bus:   data errors in packets arriving from the neighbour (the data bus
//            or the neighbour's output side);
//   - port:  data errors in packets looped back through this router's own
//            output and input port on that side (loopback mode);
//   - route: routing errors of the neighbour's routing logic.
// A permanent fault disables the port (port_disable), which puts the
// loopback module of that side into loopback mode and removes the side from
// routing, so the faulty part is bypassed. All packet errors are counted per
// port (saturating). clear resets the journal.
// The journal, the permanent/transient distinction and the localization by
// loopback follow the document; the consecutive-error rule and THRESH are
// this design's choices.
module error_journal
  import rkt_pkg::*;
#(
  parameter int unsigned THRESH = 3,
  parameter int unsigned CNT_W  = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  logic [NPORTS-1:0] ev_pkt,
  input  logic [NPORTS-1:0] ev_data_err,
  input  logic [NPORTS-1:0] ev_route_err,
  input  logic [NPORTS-1:0] ev_looped,
  output logic [NPORTS-1:0] perm_bus,
  output logic [NPORTS-1:0] perm_port,
  output logic [NPORTS-1:0] perm_route,
  output logic [NPORTS-1:0] port_disable,
  output logic [CNT_W-1:0]  err_cnt [NPORTS]
);

  localparam int unsigned RW = $clog2(THRESH+1);

  logic [RW-1:0] run_bus [NPORTS], run_port [NPORTS], run_route [NPORTS];

  assign port_disable = perm_bus | perm_port | perm_route;

  function automatic logic [RW-1:0] bump(logic [RW-1:0] r, logic err);
    if (!err)                   return '0;
    else if (r == RW'(THRESH))  return r;
    else                        return r + 1'b1;
  endfunction

  // next run lengths per side
  logic [RW-1:0] nb [NPORTS], np [NPORTS], nr [NPORTS];

  always_comb begin
    for (int p = 0; p < NPORTS; p++) begin
      nb[p] = run_bus[p];
      np[p] = run_port[p];
      nr[p] = run_route[p];
      if (ev_pkt[p]) begin
        if (ev_looped[p]) begin
          np[p] = bump(run_port[p], ev_data_err[p]);
        end else begin
          nb[p] = bump(run_bus[p], ev_data_err[p]);
          nr[p] = bump(run_route[p], ev_route_err[p]);
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      perm_bus   <= '0;
      perm_port  <= '0;
      perm_route <= '0;
      for (int p = 0; p < NPORTS; p++) begin
        run_bus[p]   <= '0;
        run_port[p]  <= '0;
        run_route[p] <= '0;
        err_cnt[p]   <= '0;
      end
    end else if (clear) begin
      perm_bus   <= '0;
      perm_port  <= '0;
      perm_route <= '0;
      for (int p = 0; p < NPORTS; p++) begin
        run_bus[p]   <= '0;
        run_port[p]  <= '0;
        run_route[p] <= '0;
        err_cnt[p]   <= '0;
      end
    end else begin
      for (int p = 0; p < NPORTS; p++) begin
        run_bus[p]   <= nb[p];
        run_port[p]  <= np[p];
        run_route[p] <= nr[p];
        if (nb[p] == RW'(THRESH)) perm_bus[p]   <= 1'b1;
        if (np[p] == RW'(THRESH)) perm_port[p]  <= 1'b1;
        if (nr[p] == RW'(THRESH)) perm_route[p] <= 1'b1;
        if (ev_pkt[p] && (ev_data_err[p] || ev_route_err[p]) && err_cnt[p] != '1)
          err_cnt[p] <= err_cnt[p] + 1'b1;
      end
    end
  end

endmodule
