// lat_mesh: packet latency of one RKT-NoC size under random traffic, a
// helper of tb_rkt_latency (testbench only).
//
// Builds a W x H rkt_noc surrounded by 2W+2H ip_model modules. Every module
// sends back-to-back packets (at its maximum injection rate) to destinations
// drawn at random among the other modules, as in the document's average
// latency evaluation. Pushing stops after WARM+WIN cycles and the network
// then drains for DRAIN cycles.
// Latency is counted from the cycle the header flit enters the network on
// the source module's link to the cycle it leaves on the destination
// module's link (first flit to first flit, as the per-router minimum is
// defined). Only packets whose header entered at or after WARM are counted.
// The header tag carries the source module (bits [11:6]) and a sequence
// number (bits [5:0]) that indexes the table of entry times; flit 1 carries
// the destination module, so wrong deliveries are counted in bad.
// Outputs (valid when done): n_pkt counted packets, lat_min / lat_max /
// lat_sum in cycles, sent / delivered totals over the whole run.
module lat_mesh
  import rkt_pkg::*;
#(
  parameter int unsigned W     = 4,
  parameter int unsigned H     = 4,
  parameter int unsigned WARM  = 400,
  parameter int unsigned WIN   = 2000,
  parameter int unsigned DRAIN = 3000
) (
  input  logic    clk,
  input  logic    rst_n,
  output int      n_pkt,
  output int      lat_min,
  output int      lat_max,
  output longint  lat_sum,
  output int      sent,
  output int      delivered,
  output int      bad,
  output logic    done
);
  localparam int unsigned PF = 4, NODES = W * H, NMOD = 2 * W + 2 * H;

  link_fwd_t mod_in [NMOD], mod_out [NMOD];
  link_bwd_t mod_in_bwd [NMOD], mod_out_bwd [NMOD];
  logic [3:0] port_disable [NODES], perm_bus [NODES], perm_port [NODES], perm_route [NODES];
  logic [3:0] loop_mode [NODES], ev_data_err [NODES], ev_route_err [NODES];
  logic [3:0] ev_resend [NODES], ev_uncorr [NODES], ev_bypass [NODES];
  logic [3:0] inj_link_en [NODES];

  always_comb for (int n = 0; n < NODES; n++) inj_link_en[n] = '0;

  rkt_noc #(.W(W), .H(H)) u_noc (
    .clk, .rst_n, .mod_in, .mod_in_bwd, .mod_out, .mod_out_bwd,
    .node_unavail('0), .inj_route_fault('0), .inj_link_en, .inj_link_mask('0),
    .journal_clear(1'b0),
    .port_disable, .perm_bus, .perm_port, .perm_route, .loop_mode,
    .ev_data_err, .ev_route_err, .ev_resend, .ev_uncorr, .ev_bypass
  );

  // header for module m (numbering of rkt_noc: N, E, S, W edges)
  function automatic hdr_t hdr_to(int m);
    hdr_t h;
    h = '0;
    if (m < W)              begin h.dst_x = 4'(m);         h.dst_y = 4'(H - 1); h.dst_port = DIR_N; end
    else if (m < W + H)     begin h.dst_x = 4'(W - 1);     h.dst_y = 4'(m - W); h.dst_port = DIR_E; end
    else if (m < 2 * W + H) begin h.dst_x = 4'(m - W - H); h.dst_y = 4'(0);     h.dst_port = DIR_S; end
    else                    begin h.dst_x = 4'(0);         h.dst_y = 4'(m - 2 * W - H); h.dst_port = DIR_W; end
    return h;
  endfunction

  int   cyc;
  logic got [NMOD];
  logic [31:0] got_pkt [NMOD][PF];
  int   pending [NMOD], n_nack [NMOD], n_stall [NMOD];
  logic [31:0] pkt [NMOD][PF];
  logic push [NMOD];
  int   dst [NMOD];
  logic [5:0] seq [NMOD];
  int   t_in [NMOD][64];
  int   fin [NMOD], fout [NMOD];   // flit position on the module links

  for (genvar m = 0; m < NMOD; m++) begin : g_mod
    always_comb begin
      hdr_t h;
      h = hdr_to(dst[m]);
      h.tag = {6'(m), seq[m]};
      pkt[m][0] = 32'(h);
      pkt[m][1] = 32'(dst[m]);
      for (int k = 2; k < PF; k++) pkt[m][k] = 32'(m * 16 + k);
      push[m] = rst_n && (cyc < int'(WARM + WIN)) && (pending[m] < 2);
    end

    // next random destination, never the module itself
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        dst[m] <= (m + 1) % int'(NMOD);
        seq[m] <= '0;
      end else if (push[m]) begin
        int d;
        d = int'($urandom % (NMOD - 1));
        dst[m] <= (d >= m) ? d + 1 : d;
        seq[m] <= seq[m] + 6'd1;
      end
    end

    ip_model #(.PKT_FLITS(PF)) u_ip (
      .clk, .rst_n, .push(push[m]), .push_pkt(pkt[m]), .corrupt_next(1'b0),
      .corrupt_mask('0), .busy_pct(0), .hold(1'b0), .pending(pending[m]),
      .tx(mod_in[m]), .tx_bwd(mod_in_bwd[m]), .rx(mod_out[m]), .rx_bwd(mod_out_bwd[m]),
      .got(got[m]), .got_pkt(got_pkt[m]), .n_nack_rx(n_nack[m]), .n_stall(n_stall[m])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cyc <= 0; n_pkt <= 0; lat_min <= 32'h7fff_ffff; lat_max <= 0; lat_sum <= 0;
      sent <= 0; delivered <= 0; bad <= 0;
      for (int m = 0; m < NMOD; m++) begin fin[m] <= 0; fout[m] <= 0; end
    end else begin
      int n, mn, mx, s, d, b;
      longint sm;
      n = n_pkt; mn = lat_min; mx = lat_max; sm = lat_sum; s = sent; d = delivered; b = bad;
      for (int m = 0; m < NMOD; m++) begin
        // header entering from module m
        if (mod_in[m].valid) begin
          if (fin[m] == 0) begin
            t_in[m][mod_in[m].cw[5:0]] <= cyc;
            s++;
          end
          fin[m] <= (fin[m] + 1) % PF;
        end
        // header leaving to module m
        if (mod_out[m].valid) begin
          if (fout[m] == 0) begin
            int src, t0;
            src = int'(mod_out[m].cw[11:6]);
            t0  = t_in[src % NMOD][mod_out[m].cw[5:0]];
            if (t0 >= int'(WARM)) begin
              n++;
              sm += longint'(int'(cyc - t0));
              if (cyc - t0 < mn) mn = cyc - t0;
              if (cyc - t0 > mx) mx = cyc - t0;
            end
          end
          fout[m] <= (fout[m] + 1) % PF;
        end
        if (got[m]) begin
          d++;
          if (got_pkt[m][1] != 32'(m)) b++;
        end
      end
      cyc <= cyc + 1;
      n_pkt <= n; lat_min <= mn; lat_max <= mx; lat_sum <= sm;
      sent <= s; delivered <= d; bad <= b;
    end
  end

  assign done = (cyc >= int'(WARM + WIN + DRAIN));
endmodule
