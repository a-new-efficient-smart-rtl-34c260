// tb_rkt_noc: end-to-end test of the RKT network-on-chip at its default
// size (4x4 routers, 16 edge modules, 4-flit packets).
// Every edge port has an ip_model. Phases, each mechanism counted:
//   1. latency of one packet across a row (4 routers): 4 x 15 cycles;
//   2. random traffic between all modules with random receiver stalls;
//   3. a correctable error injected on an internal link (DMC correction);
//   4. an uncorrectable error burst on an internal link (Nack and resend);
//   5. a router marked unavailable while traffic runs: its neighbours loop
//      back trapped packets and route around it (bypass); packets inside
//      the unavailable router wait there until it is available again;
//   6. a router with faulty routing logic: its neighbours detect routing
//      errors and disable the side facing it (journal, permanent fault).
// In phases 1-5 every packet must reach the right module once with its
// payload. In phase 6 packets routed by the faulty router may be lost or
// reach a wrong module; they are not counted as failures, the detection is.
module tb_rkt_noc;
  import rkt_pkg::*;
  localparam int W = 4, H = 4, PF = 4, NODES = W * H, NMOD = 2 * W + 2 * H;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  link_fwd_t mod_in [NMOD], mod_out [NMOD];
  link_bwd_t mod_in_bwd [NMOD], mod_out_bwd [NMOD];
  logic [NODES-1:0] node_unavail, inj_route_fault;
  logic [3:0]       inj_link_en [NODES];
  logic [CW_W-1:0]  inj_link_mask;
  logic             journal_clear;
  logic [3:0] port_disable [NODES], perm_bus [NODES], perm_port [NODES], perm_route [NODES];
  logic [3:0] loop_mode [NODES], ev_data_err [NODES], ev_route_err [NODES];
  logic [3:0] ev_resend [NODES], ev_uncorr [NODES], ev_bypass [NODES];

  rkt_noc dut (
    .clk, .rst_n, .mod_in, .mod_in_bwd, .mod_out, .mod_out_bwd,
    .node_unavail, .inj_route_fault, .inj_link_en, .inj_link_mask, .journal_clear,
    .port_disable, .perm_bus, .perm_port, .perm_route, .loop_mode,
    .ev_data_err, .ev_route_err, .ev_resend, .ev_uncorr, .ev_bypass
  );

  logic        push [NMOD], corrupt [NMOD], hold [NMOD], got [NMOD];
  logic [31:0] pkt [NMOD][PF];
  logic [31:0] got_pkt [NMOD][PF];
  int          pending [NMOD], n_nack [NMOD], n_stall [NMOD], busy [NMOD];
  logic [CW_W-1:0] cmask = '0;

  for (genvar m = 0; m < NMOD; m++) begin : g_mod
    ip_model #(.PKT_FLITS(PF)) u_ip (
      .clk, .rst_n, .push(push[m]), .push_pkt(pkt[m]), .corrupt_next(corrupt[m]),
      .corrupt_mask(cmask), .busy_pct(busy[m]), .hold(hold[m]), .pending(pending[m]),
      .tx(mod_in[m]), .tx_bwd(mod_in_bwd[m]), .rx(mod_out[m]), .rx_bwd(mod_out_bwd[m]),
      .got(got[m]), .got_pkt(got_pkt[m]), .n_nack_rx(n_nack[m]), .n_stall(n_stall[m])
    );
  end

  int checks = 0, failures = 0;
  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s (t=%0t)", m, $time); end
  endtask

  // router and side of module m
  function automatic hdr_t mod_hdr(int m, int tag);
    hdr_t h;
    h = '0;
    if (m < W)              begin h.dst_x = 4'(m);         h.dst_y = 4'(H - 1); h.dst_port = DIR_N; end
    else if (m < W + H)     begin h.dst_x = 4'(W - 1);     h.dst_y = 4'(m - W); h.dst_port = DIR_E; end
    else if (m < 2 * W + H) begin h.dst_x = 4'(m - W - H); h.dst_y = 4'(0);     h.dst_port = DIR_S; end
    else                    begin h.dst_x = 4'(0);  h.dst_y = 4'(m - 2 * W - H); h.dst_port = DIR_W; end
    h.tag = 12'(tag);
    return h;
  endfunction

  int          exp_mod [int];
  logic [31:0] exp_pay [int];
  int delivered = 0, wrong = 0, n_bypass = 0, lost_ok = 0;
  int n_data_err = 0, n_route_err = 0, n_resend = 0, n_uncorr = 0, n_loop_cycles = 0;
  bit tolerate = 0;

  always @(posedge clk) begin
    for (int m = 0; m < NMOD; m++) begin
      if (got[m]) begin
        hdr_t h;
        int   t;
        bit   ok;
        h  = hdr_t'(got_pkt[m][0]);
        t  = int'(h.tag);
        ok = exp_mod.exists(t) && exp_mod[t] == m;
        for (int k = 1; k < PF; k++)
          if (exp_pay.exists(t) && got_pkt[m][k] != exp_pay[t] + 32'(k)) ok = 0;
        if (ok) begin
          delivered++;
          exp_mod.delete(t);
        end else if (tolerate) begin
          lost_ok++;
          exp_mod.delete(t);
        end else begin
          wrong++;
          $display("FAIL packet tag %0d at module %0d", t, m);
        end
      end
    end
    for (int n = 0; n < NODES; n++) begin
      n_data_err  += $countones(ev_data_err[n]);
      n_route_err += $countones(ev_route_err[n]);
      n_resend    += $countones(ev_resend[n]);
      n_uncorr    += $countones(ev_uncorr[n]);
      n_bypass    += $countones(ev_bypass[n]);
      if (loop_mode[n] != 0) n_loop_cycles++;
    end
  end

  int tag_next = 1;
  task automatic send(int src, int dst);
    hdr_t h;
    h = mod_hdr(dst, tag_next);
    pkt[src][0] <= 32'(h);
    exp_pay[tag_next] = $urandom;
    for (int k = 1; k < PF; k++) pkt[src][k] <= exp_pay[tag_next] + 32'(k);
    exp_mod[tag_next] = dst;
    push[src] <= 1'b1;
    tag_next = (tag_next % 4095) + 1;
  endtask

  // one cycle of random injection: each module pushes with chance pct
  task automatic random_cycle(int pct);
    @(posedge clk);
    for (int m = 0; m < NMOD; m++) push[m] <= 1'b0;
    for (int m = 0; m < NMOD; m++)
      if ($urandom_range(0, 99) < pct && pending[m] < 3) begin
        int d;
        d = $urandom_range(0, NMOD - 1);
        if (d == m) d = (m + 1) % NMOD;
        send(m, d);
      end
  endtask

  task automatic drain(int max_cycles);
    int c = 0, p;
    @(posedge clk);
    for (int m = 0; m < NMOD; m++) push[m] <= 1'b0;
    forever begin
      p = 0;
      for (int m = 0; m < NMOD; m++) p += pending[m];
      if (c >= max_cycles || (exp_mod.size() == 0 && p == 0)) break;
      @(posedge clk); c++;
    end
    repeat (5) @(posedge clk);
  endtask

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0, lat, d0;
    for (int m = 0; m < NMOD; m++) begin
      push[m] = 0; corrupt[m] = 0; hold[m] = 0; busy[m] = 0;
      for (int k = 0; k < PF; k++) pkt[m][k] = '0;
    end
    for (int n = 0; n < NODES; n++) inj_link_en[n] = '0;
    node_unavail = '0; inj_route_fault = '0; inj_link_mask = '0; journal_clear = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // 1. latency: West module of row 0 to East module of row 0
    @(posedge clk);
    send(2 * W + H + 0, W + 0);
    @(posedge clk);
    push[2 * W + H] <= 1'b0;
    while (!mod_in[2 * W + H].valid) @(posedge clk);
    t0 = int'($time / 10);
    while (!mod_out[W].valid) @(posedge clk);
    lat = int'($time / 10) - t0;
    chk(lat == W * 15, $sformatf("latency across %0d routers = %0d, expected %0d", W, lat, W * 15));
    drain(500);
    chk(delivered == 1, "latency packet delivered");

    // 2. random traffic with stalls
    for (int m = 0; m < NMOD; m++) busy[m] = 20;
    d0 = delivered;
    for (int c = 0; c < 1500; c++) random_cycle(5);
    drain(20000);
    chk(exp_mod.size() == 0, $sformatf("random traffic: %0d packets not delivered", exp_mod.size()));
    chk(delivered - d0 > 500, $sformatf("random traffic volume %0d", delivered - d0));
    for (int m = 0; m < NMOD; m++) busy[m] = 0;

    // 3. correctable error on the link leaving router 5 = (1,1) to the East
    n_data_err = 0;
    inj_link_mask = 68'h0000_0000_0000_0C00;   // two bits of symbol 2
    inj_link_en[5][1] = 1'b1;
    for (int c = 0; c < 300; c++) random_cycle(5);
    drain(5000);
    inj_link_en[5][1] = 1'b0;
    chk(exp_mod.size() == 0, "traffic over a noisy link delivered");
    chk(n_data_err > 0, "link data errors corrected");
    @(posedge clk); journal_clear <= 1; @(posedge clk); journal_clear <= 0;

    // 4. uncorrectable burst on the link leaving router 6 = (2,1) to the West
    n_resend = 0; n_uncorr = 0;
    inj_link_mask = 68'h0000_0000_0001_0001;   // bit 0 of symbols 0 and 4
    for (int c = 0; c < 400; c++) begin
      inj_link_en[6][3] = (c % 50) < 10;
      random_cycle(5);
    end
    inj_link_en[6][3] = 1'b0;
    drain(5000);
    chk(exp_mod.size() == 0, "traffic after uncorrectable errors delivered");
    chk(n_uncorr > 0 && n_resend > 0, $sformatf("Nack/resend: uncorr=%0d resend=%0d", n_uncorr, n_resend));
    @(posedge clk); journal_clear <= 1; @(posedge clk); journal_clear <= 0;

    // 5. router 9 = (1,2) becomes unavailable during traffic
    n_bypass = 0; n_loop_cycles = 0;
    for (int c = 0; c < 100; c++) random_cycle(6);
    node_unavail[9] = 1'b1;
    for (int c = 0; c < 800; c++) random_cycle(4);
    drain(5000);
    // only packets that were inside router 9 itself may still be waiting
    chk(exp_mod.size() <= 16, $sformatf("traffic around unavailable router: %0d waiting", exp_mod.size()));
    chk(n_bypass > 0, "bypass routes taken");
    chk(n_loop_cycles > 0, "loopback mode used");
    node_unavail[9] = 1'b0;
    drain(5000);
    chk(exp_mod.size() == 0, $sformatf("after the router is back: %0d lost", exp_mod.size()));

    // 6. faulty routing logic in router 10 = (2,2)
    n_route_err = 0;
    tolerate = 1;
    inj_route_fault[10] = 1'b1;
    for (int c = 0; c < 1500; c++) random_cycle(5);
    drain(10000);
    chk(n_route_err > 0, "routing errors detected");
    chk(perm_route[6][0] || perm_route[9][1] || perm_route[11][3] || perm_route[14][2],
        "a neighbour of the faulty router disabled the side facing it");
    inj_route_fault[10] = 1'b0;
    tolerate = 0;

    chk(wrong == 0, "no packet delivered wrongly outside the faulty-router phase");
    $display("mechanisms: delivered=%0d data_err=%0d uncorr=%0d resend=%0d bypass=%0d loop_cycles=%0d route_err=%0d lost_in_fault_phase=%0d",
             delivered, n_data_err, n_uncorr, n_resend, n_bypass, n_loop_cycles, n_route_err, lost_ok);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
