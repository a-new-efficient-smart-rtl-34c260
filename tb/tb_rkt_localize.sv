// tb_rkt_localize: routing error localization in a 6x6 RKT-NoC, the size
// the document uses for this evaluation.
// The 24 edge modules send packets to random other modules while the
// routing logic of one inner router, (2,2), is made faulty (it turns its XY
// choice one step clockwise without flagging a bypass). The neighbours check
// every packet that router sends them and their journals declare a
// permanent routing fault on the side facing it, which takes that router
// out of the network. After the run every side with a permanent routing
// fault is classified: correctly localized (a neighbour's side facing the
// faulty router) or wrongly localized (any other side). The localization
// rate is printed.
// Checks: the faulty router is found (at least two of its neighbours point
// at it), no side elsewhere is blamed, and routing errors were seen.
// Packets the faulty router misroutes may be lost or delivered to a wrong
// module; that is the fault, not a failure of the test.
module tb_rkt_localize;
  import rkt_pkg::*;
  localparam int W = 6, H = 6, PF = 4, NODES = W * H, NMOD = 2 * W + 2 * H;
  localparam int FX = 2, FY = 2, FN = FY * W + FX;
  localparam int RUN = 8000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  link_fwd_t mod_in [NMOD], mod_out [NMOD];
  link_bwd_t mod_in_bwd [NMOD], mod_out_bwd [NMOD];
  logic [NODES-1:0] inj_route_fault;
  logic [3:0] inj_link_en [NODES];
  logic [3:0] port_disable [NODES], perm_bus [NODES], perm_port [NODES], perm_route [NODES];
  logic [3:0] loop_mode [NODES], ev_data_err [NODES], ev_route_err [NODES];
  logic [3:0] ev_resend [NODES], ev_uncorr [NODES], ev_bypass [NODES];

  rkt_noc #(.W(W), .H(H)) dut (
    .clk, .rst_n, .mod_in, .mod_in_bwd, .mod_out, .mod_out_bwd,
    .node_unavail('0), .inj_route_fault, .inj_link_en, .inj_link_mask('0),
    .journal_clear(1'b0),
    .port_disable, .perm_bus, .perm_port, .perm_route, .loop_mode,
    .ev_data_err, .ev_route_err, .ev_resend, .ev_uncorr, .ev_bypass
  );

  function automatic hdr_t hdr_to(int m);
    hdr_t h;
    h = '0;
    if (m < W)              begin h.dst_x = 4'(m);         h.dst_y = 4'(H - 1); h.dst_port = DIR_N; end
    else if (m < W + H)     begin h.dst_x = 4'(W - 1);     h.dst_y = 4'(m - W); h.dst_port = DIR_E; end
    else if (m < 2 * W + H) begin h.dst_x = 4'(m - W - H); h.dst_y = 4'(0);     h.dst_port = DIR_S; end
    else                    begin h.dst_x = 4'(0);         h.dst_y = 4'(m - 2 * W - H); h.dst_port = DIR_W; end
    return h;
  endfunction

  logic got [NMOD];
  logic [31:0] got_pkt [NMOD][PF];
  int   pending [NMOD], n_nack [NMOD], n_stall [NMOD];
  logic [31:0] pkt [NMOD][PF];
  logic push [NMOD];
  logic run;
  int   dst [NMOD];

  for (genvar m = 0; m < NMOD; m++) begin : g_mod
    always_comb begin
      hdr_t h;
      h = hdr_to(dst[m]);
      h.tag = 12'(m);
      pkt[m][0] = 32'(h);
      for (int k = 1; k < PF; k++) pkt[m][k] = 32'(m * 16 + k);
      push[m] = run && (pending[m] < 1);
    end
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) dst[m] <= (m + 1) % NMOD;
      else if (push[m]) begin
        int d;
        d = int'($urandom % (NMOD - 1));
        dst[m] <= (d >= m) ? d + 1 : d;
      end
    end
    ip_model #(.PKT_FLITS(PF)) u_ip (
      .clk, .rst_n, .push(push[m]), .push_pkt(pkt[m]), .corrupt_next(1'b0),
      .corrupt_mask('0), .busy_pct(0), .hold(1'b0), .pending(pending[m]),
      .tx(mod_in[m]), .tx_bwd(mod_in_bwd[m]), .rx(mod_out[m]), .rx_bwd(mod_out_bwd[m]),
      .got(got[m]), .got_pkt(got_pkt[m]), .n_nack_rx(n_nack[m]), .n_stall(n_stall[m])
    );
  end

  int n_rerr = 0;
  always @(negedge clk) if (rst_n)
    for (int n = 0; n < NODES; n++) n_rerr += $countones(ev_route_err[n]);

  int checks = 0, failures = 0;
  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // the side of node n that faces the faulty router, or -1
  function automatic int facing(int n);
    int x, y;
    x = n % W; y = n / W;
    if (x == FX && y == FY + 1) return int'(DIR_S);
    if (x == FX + 1 && y == FY) return int'(DIR_W);
    if (x == FX && y == FY - 1) return int'(DIR_N);
    if (x == FX - 1 && y == FY) return int'(DIR_E);
    return -1;
  endfunction

  initial begin
    int good, wrong, nbrs;
    run = 0; inj_route_fault = '0;
    for (int n = 0; n < NODES; n++) inj_link_en[n] = '0;
    good = 0; wrong = 0; nbrs = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    inj_route_fault[FN] <= 1'b1;
    run <= 1'b1;
    repeat (RUN) @(posedge clk);
    run <= 1'b0;
    repeat (500) @(posedge clk);
    @(negedge clk);
    for (int n = 0; n < NODES; n++)
      for (int p = 0; p < NPORTS; p++)
        if (perm_route[n][p]) begin
          if (facing(n) == p) good++;
          else begin
            wrong++;
            $display("side %0d of router (%0d,%0d) blamed", p, n % W, n / W);
          end
        end
    for (int n = 0; n < NODES; n++)
      if (facing(n) >= 0 && port_disable[n][facing(n)]) nbrs++;
    $display("6x6 localization: routing errors seen=%0d, correct sides=%0d, wrong sides=%0d, neighbours isolating the router=%0d of 4",
             n_rerr, good, wrong, nbrs);
    if (good + wrong > 0)
      $display("localization rate = %0d%%", (100 * good) / (good + wrong));
    chk(n_rerr > 0, "routing errors detected");
    chk(good >= 2, $sformatf("faulty router localized by %0d neighbours", good));
    chk(wrong == 0, $sformatf("%0d sides wrongly blamed", wrong));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
