// tb_rkt_switch: self-checking test of one RKT-switch.
// The router sits at (1,1); four ip_model instances play its four
// neighbour routers. Checks, each with its own counter of occurrences:
//   - latency: first flit in on W to first flit out on E, 15 cycles;
//   - traffic on all sides with random stalls, every packet delivered once,
//     on the right side, with its payload;
//   - a corrected data error (one symbol) is delivered intact and reported;
//   - an uncorrectable data error is refused (Nack) and resent;
//   - three routing errors in a row from N make that side permanently
//     disabled (journal), with its loopback module in loopback mode;
//   - three data errors in a row from S make the S data bus permanent;
//   - packets trapped in the E output buffer when E becomes unavailable are
//     looped back and leave by another side with the bypass flag.
module tb_rkt_switch;
  import rkt_pkg::*;
  localparam int PF = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  link_fwd_t link_in [4], link_out [4];
  link_bwd_t bwd_in [4], bwd_out [4];
  logic [3:0] nbr_unavail, port_disable, perm_bus, perm_port, perm_route, loop_mode;
  logic [3:0] ev_data_err, ev_route_err, ev_resend, ev_uncorr, ev_bypass;
  logic       journal_clear;

  rkt_switch dut (
    .clk, .rst_n, .my_x(4'd1), .my_y(4'd1),
    .link_in, .bwd_out, .link_out, .bwd_in,
    .nbr_router(4'b1111), .nbr_unavail, .nbr_disable(4'b0000), .diag_unavail(4'b0000),
    .inj_route_fault(1'b0), .journal_clear,
    .port_disable, .perm_bus, .perm_port, .perm_route, .loop_mode,
    .ev_data_err, .ev_route_err, .ev_resend, .ev_uncorr, .ev_bypass
  );

  // neighbour models
  logic        push [4], corrupt [4], hold [4], got [4];
  logic [31:0] pkt [4][PF];
  logic [31:0] got_pkt [4][PF];
  int          pending [4], n_nack [4], n_stall [4], busy [4];
  logic [CW_W-1:0] cmask = 68'h3;   // two bits of symbol 0: correctable

  for (genvar s = 0; s < 4; s++) begin : g_nb
    ip_model #(.PKT_FLITS(PF)) u_nb (
      .clk, .rst_n, .push(push[s]), .push_pkt(pkt[s]), .corrupt_next(corrupt[s]),
      .corrupt_mask(cmask),
      .busy_pct(busy[s]), .hold(hold[s]), .pending(pending[s]),
      .tx(link_in[s]), .tx_bwd(bwd_out[s]), .rx(link_out[s]), .rx_bwd(bwd_in[s]),
      .got(got[s]), .got_pkt(got_pkt[s]), .n_nack_rx(n_nack[s]), .n_stall(n_stall[s])
    );
  end

  int checks = 0, failures = 0;
  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s (t=%0t)", m, $time); end
  endtask

  // neighbour coordinates per side
  function automatic hdr_t mk_hdr(int dst_side, int tag);
    hdr_t h;
    h = '0;
    h.dst_x = (dst_side == 1) ? 4'd2 : (dst_side == 3) ? 4'd0 : 4'd1;
    h.dst_y = (dst_side == 0) ? 4'd2 : (dst_side == 2) ? 4'd0 : 4'd1;
    h.dst_port = dir_e'(dst_side);
    h.tag = 12'(tag);
    return h;
  endfunction

  // scoreboard: expected side and payload per tag
  int          exp_side [int];
  logic [31:0] exp_pay  [int];
  int          delivered = 0, wrong = 0, n_bypass_seen = 0;
  int          n_data_err = 0, n_route_err = 0, n_resend = 0;

  always @(posedge clk) begin
    for (int s = 0; s < 4; s++) begin
      if (got[s]) begin
        hdr_t h;
        int   t;
        h = hdr_t'(got_pkt[s][0]);
        t = int'(h.tag);
        if (!exp_side.exists(t)) begin
          wrong++;
          $display("FAIL unexpected packet tag %0d on side %0d", t, s);
        end else begin
          if (exp_side[t] >= 0 && exp_side[t] != s) begin
            wrong++; $display("FAIL tag %0d on side %0d, expected %0d", t, s, exp_side[t]);
          end
          for (int k = 1; k < PF; k++)
            if (got_pkt[s][k] != exp_pay[t] + 32'(k)) begin
              wrong++; $display("FAIL tag %0d flit %0d = %h", t, k, got_pkt[s][k]);
            end
          if (h.bypass) n_bypass_seen++;
          exp_side.delete(t);
          delivered++;
        end
      end
    end
    n_data_err  += $countones(ev_data_err);
    n_route_err += $countones(ev_route_err);
    n_resend    += $countones(ev_resend);
  end

  int tag_next = 1;
  task automatic send(int src, int dst_side, bit bad = 0, int exp_s = -2, bit byp = 0);
    hdr_t h;
    h = mk_hdr(dst_side, tag_next);
    h.bypass = byp;
    @(posedge clk);
    pkt[src][0] <= 32'(h);
    exp_pay[tag_next] = $urandom;
    for (int k = 1; k < PF; k++) pkt[src][k] <= exp_pay[tag_next] + 32'(k);
    exp_side[tag_next] = (exp_s == -2) ? dst_side : exp_s;
    push[src]    <= 1'b1;
    corrupt[src] <= bad;
    tag_next = (tag_next % 4095) + 1;
    @(posedge clk);
    push[src]    <= 1'b0;
    corrupt[src] <= 1'b0;
  endtask

  task automatic drain(int max_cycles);
    int c = 0;
    while (c < max_cycles && (exp_side.size() > 0 ||
           pending[0] + pending[1] + pending[2] + pending[3] > 0)) begin
      @(posedge clk); c++;
    end
    repeat (5) @(posedge clk);
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0, lat;
    for (int s = 0; s < 4; s++) begin
      push[s] = 0; corrupt[s] = 0; hold[s] = 0; busy[s] = 0;
      for (int k = 0; k < PF; k++) pkt[s][k] = '0;
    end
    nbr_unavail = '0; journal_clear = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // 1. latency W -> E
    send(3, 1);
    while (!link_in[3].valid) @(posedge clk);
    t0 = int'($time / 10);
    while (!link_out[1].valid) @(posedge clk);
    lat = int'($time / 10) - t0;
    chk(lat == 15, $sformatf("router latency %0d, expected 15", lat));
    drain(200);
    chk(delivered == 1, "single packet delivered");

    // 2. traffic with stalls; N and S sources only send straight through
    for (int s = 0; s < 4; s++) busy[s] = 30;
    for (int n = 0; n < 60; n++) begin
      int src, dst;
      src = $urandom_range(0, 3);
      if (src == 0 || src == 2) dst = src ^ 2;
      else begin
        dst = $urandom_range(0, 3);
        if (dst == src) dst = src ^ 2;
      end
      send(src, dst);
    end
    drain(5000);
    chk(exp_side.size() == 0, "all traffic delivered");
    chk(n_stall[0] + n_stall[1] + n_stall[2] + n_stall[3] > 0, "stalls happened");
    for (int s = 0; s < 4; s++) busy[s] = 0;

    // 3. corrected data error
    n_data_err = 0;
    send(3, 1, 1'b1);
    drain(200);
    chk(exp_side.size() == 0, "corrected packet delivered");
    chk(n_data_err == 1, "data error reported");

    // 4. uncorrectable error: Nack and resend
    n_resend = 0;
    cmask = 68'h1_0001;   // bit 0 of symbols 0 and 4: uncorrectable
    send(3, 1, 1'b1);
    drain(300);
    cmask = 68'h3;
    drain(300);
    chk(exp_side.size() == 0, "resent packet delivered");
    chk(n_nack[3] >= 1, "Nack received by sender");

    // 5. three routing errors from N: P=(1,2) sends a packet for (0,3)
    n_route_err = 0;
    for (int i = 0; i < 3; i++) send(0, 3, 1'b0, -1);
    drain(600);
    chk(n_route_err == 3, $sformatf("routing errors seen %0d", n_route_err));
    chk(perm_route[0] && port_disable[0], "N side permanently disabled");
    repeat (5) @(posedge clk);
    chk(loop_mode[0], "N loopback module in loopback mode");

    // 6. three data errors in a row from S
    for (int i = 0; i < 3; i++) send(2, 0, 1'b1, -1);
    drain(600);
    chk(perm_bus[2] && !perm_port[2], "S data bus fault localized");

    @(posedge clk); journal_clear <= 1; @(posedge clk); journal_clear <= 0;
    repeat (10) @(posedge clk);
    chk(port_disable == 0, "journal cleared");

    // 7. loopback: E holds, two packets wait in the E output buffer
    n_bypass_seen = 0;
    hold[1] = 1;
    send(3, 1, 1'b0, 2);
    send(3, 1, 1'b0, 2);
    repeat (60) @(posedge clk);
    chk(exp_side.size() == 2, "packets held for E");
    nbr_unavail[1] = 1;
    drain(600);
    chk(exp_side.size() == 0, "looped-back packets delivered through S");
    chk(n_bypass_seen == 2, "looped packets flagged as bypass");
    chk(loop_mode[1], "E loopback mode");

    chk(wrong == 0, "no wrong deliveries");
    $display("mechanisms: delivered=%0d stalls=%0d data_err=%0d route_err=%0d resend=%0d bypass=%0d",
             delivered, n_stall[0] + n_stall[1] + n_stall[2] + n_stall[3], n_data_err,
             n_route_err, n_resend, n_bypass_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
