// fir_mesh: maximum flit injection rate of one RKT-NoC size, a helper of
// tb_rkt_fir (testbench only).
//
// Builds a W x H rkt_noc surrounded by 2W+2H ip_model modules. Every module
// sends back-to-back packets to the module on the opposite side of the
// mesh (North x <-> South x, East y <-> West y), the pattern without any
// router congestion under which the document defines FIRmax. After a
// warm-up of WARM cycles, the flits delivered during WIN cycles are
// counted; fir_milli is the flit injection rate per module (delivered flits
// per module per cycle) in thousandths, valid when done is high. Wrong or
// lost packets are counted in bad.
module fir_mesh
  import rkt_pkg::*;
#(
  parameter int unsigned W    = 4,
  parameter int unsigned H    = 4,
  parameter int unsigned WARM = 400,
  parameter int unsigned WIN  = 2000
) (
  input  logic clk,
  input  logic rst_n,
  output int   fir_milli,
  output int   bad,
  output logic done
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

  // module on the opposite side and the header that reaches it
  function automatic int opp(int m);
    if (m < W)              return W + H + m;
    else if (m < W + H)     return 2 * W + H + (m - W);
    else if (m < 2 * W + H) return m - W - H;
    else                    return W + (m - 2 * W - H);
  endfunction
  function automatic logic [31:0] hdr_to(int m);
    hdr_t h;
    h = '0;
    if (m < W)              begin h.dst_x = 4'(m);         h.dst_y = 4'(H - 1); h.dst_port = DIR_N; end
    else if (m < W + H)     begin h.dst_x = 4'(W - 1);     h.dst_y = 4'(m - W); h.dst_port = DIR_E; end
    else if (m < 2 * W + H) begin h.dst_x = 4'(m - W - H); h.dst_y = 4'(0);     h.dst_port = DIR_S; end
    else                    begin h.dst_x = 4'(0);         h.dst_y = 4'(m - 2 * W - H); h.dst_port = DIR_W; end
    h.tag = 12'(m);
    return 32'(h);
  endfunction

  int cyc;
  int flits;
  logic got [NMOD];
  logic [31:0] got_pkt [NMOD][PF];
  int   pending [NMOD], n_nack [NMOD], n_stall [NMOD];
  logic [31:0] pkt [NMOD][PF];
  logic push [NMOD];

  for (genvar m = 0; m < NMOD; m++) begin : g_mod
    always_comb begin
      pkt[m][0] = hdr_to(opp(m));
      for (int k = 1; k < PF; k++) pkt[m][k] = 32'(m * 16 + k);
      push[m] = rst_n && (pending[m] < 2);
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
      cyc <= 0; flits <= 0; bad <= 0;
    end else begin
      int f, b;
      f = 0; b = 0;
      for (int m = 0; m < NMOD; m++)
        if (got[m]) begin
          f += PF;
          if (got_pkt[m][0][11:0] != 12'(m)) b++;   // tag = destination module
        end
      cyc <= cyc + 1;
      if (cyc >= int'(WARM) && cyc < int'(WARM + WIN)) flits <= flits + f;
      bad <= bad + b;
    end
  end

  assign done      = (cyc >= int'(WARM + WIN));
  assign fir_milli = (flits * 1000) / int'(WIN * NMOD);
endmodule
