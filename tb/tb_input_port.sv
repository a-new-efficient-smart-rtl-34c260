// tb_input_port: self-checking test of one router input port (West side of
// router (1,1), fed by a neighbour router).
// Checks, against reference codewords and routes worked out here:
//   - a clean packet is acknowledged, requested towards its XY side and
//     handed over flit by flit with the header unchanged;
//   - a correctable error is corrected (ev_data_err) and acknowledged;
//   - an uncorrectable error gives a Nack and drops the packet (ev_uncorr);
//   - a packet the previous router should not have sent here raises
//     ev_route_err;
//   - with the XY side unavailable the packet is requested to the fall-back
//     side and its header carries the bypass flag (ev_bypass);
//   - Occ rises when IN_PKTS packets wait, and looped packets are reported.
// Stimulus is applied with non-blocking assignments after a rising edge,
// outputs are sampled at the falling edge.
module tb_input_port;
  import rkt_pkg::*;
  localparam int PF = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  link_fwd_t         link_in;
  link_bwd_t         bwd_out;
  logic              loop_mode, from_router, inj_route_fault, req, xfer;
  logic [3:0]        diag_unavail;
  logic [NPORTS-1:0] avail;
  dir_e              req_port;
  logic [DATA_W-1:0] xfer_data;
  logic ev_pkt, ev_data_err, ev_uncorr, ev_route_err, ev_looped, ev_bypass;

  input_port #(.PORT(DIR_W), .PKT_FLITS(PF), .IN_PKTS(2)) dut (
    .clk, .rst_n, .my_x(4'd1), .my_y(4'd1), .link_in, .bwd_out, .loop_mode,
    .from_router, .diag_unavail, .avail, .inj_route_fault, .req, .req_port,
    .xfer, .xfer_data, .ev_pkt, .ev_data_err, .ev_uncorr, .ev_route_err,
    .ev_looped, .ev_bypass
  );

  int checks = 0, failures = 0;
  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s (t=%0t)", m, $time); end
  endtask

  function automatic logic [CW_W-1:0] ref_enc(logic [31:0] d);
    logic [19:0] h;
    logic [15:0] v;
    h[4:0]   = 5'(d[3:0])   + 5'(d[11:8]);
    h[9:5]   = 5'(d[7:4])   + 5'(d[15:12]);
    h[14:10] = 5'(d[19:16]) + 5'(d[27:24]);
    h[19:15] = 5'(d[23:20]) + 5'(d[31:28]);
    v        = d[15:0] ^ d[31:16];
    return {v, h, d};
  endfunction

  int n_ack = 0, n_nack = 0, n_pkt = 0, n_derr = 0, n_unc = 0, n_rerr = 0, n_loop = 0, n_byp = 0;
  always @(negedge clk) if (rst_n) begin
    n_ack  += int'(bwd_out.ack);
    n_nack += int'(bwd_out.nack);
    n_pkt  += int'(ev_pkt);
    n_derr += int'(ev_data_err);
    n_unc  += int'(ev_uncorr);
    n_rerr += int'(ev_route_err);
    n_loop += int'(ev_looped);
    n_byp  += int'(ev_bypass);
  end

  logic [31:0] pk [PF];
  logic [31:0] got [PF];
  dir_e        got_port;

  function automatic logic [31:0] mk_hdr(int dx, int dy, dir_e dp);
    hdr_t h;
    h = hdr_t'($urandom);
    h.dst_x = 4'(dx); h.dst_y = 4'(dy); h.dst_port = dp;
    h.bypass = 1'b0; h.turn = 1'b0;
    return 32'(h);
  endfunction

  // new packet to (dx, dy); one flit may get an error mask
  task automatic send_pkt(int dx, int dy, int bad_flit, logic [CW_W-1:0] mask);
    pk[0] = mk_hdr(dx, dy, DIR_N);
    for (int k = 1; k < PF; k++) pk[k] = $urandom;
    for (int k = 0; k < PF; k++) begin
      @(posedge clk);
      link_in <= '{valid: 1'b1, cw: ref_enc(pk[k]) ^ ((k == bad_flit) ? mask : '0)};
    end
    @(posedge clk); link_in <= '0;
    repeat (8) @(negedge clk);
  endtask

  // grant the port's request and collect the packet
  task automatic take_pkt();
    int n;
    n = 0;
    @(negedge clk);
    while (!req && n < 20) begin @(negedge clk); n++; end
    got_port = req_port;
    @(posedge clk); xfer <= 1'b1;
    for (int k = 0; k < PF; k++) begin
      @(negedge clk); got[k] = xfer_data;
      if (k == PF - 1) begin @(posedge clk); xfer <= 1'b0; end
      else @(posedge clk);
    end
    @(negedge clk);
  endtask

  function automatic bit same_pkt(bit byp);
    hdr_t h, g;
    h = hdr_t'(pk[0]);
    g = hdr_t'(got[0]);
    h.bypass = byp;
    h.turn   = g.turn;
    if (got[0] != 32'(h)) return 0;
    for (int k = 1; k < PF; k++) if (got[k] != pk[k]) return 0;
    return 1;
  endfunction

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    link_in = '0; loop_mode = 0; from_router = 1; inj_route_fault = 0; xfer = 0;
    diag_unavail = '0; avail = 4'b1111;
    got_port = DIR_N;
    for (int k = 0; k < PF; k++) begin pk[k] = '0; got[k] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(!req && !bwd_out.occ, "idle after reset");

    // 1. clean packet to (3,1): Ack, request East, header unchanged
    send_pkt(3, 1, -1, '0);
    chk(n_ack == 1 && n_nack == 0 && n_pkt == 1, "clean packet acknowledged");
    take_pkt();
    chk(got_port == DIR_E && same_pkt(0), "clean packet routed East unchanged");
    chk(!req, "request dropped after the transfer");

    // 2. correctable: two bits of one symbol in the header flit
    send_pkt(1, 3, 0, 68'h0000_0000_0000_00C0);
    chk(n_ack == 2 && n_derr == 1, "corrected error reported and acknowledged");
    take_pkt();
    chk(got_port == DIR_N && same_pkt(0), "corrected packet routed North intact");

    // 3. uncorrectable: bit 0 of symbols 0 and 4 in flit 2
    send_pkt(3, 1, 2, 68'h0000_0000_0001_0001);
    chk(n_nack == 1 && n_unc == 1 && n_ack == 2, "uncorrectable error: Nack");
    repeat (5) @(negedge clk);
    chk(!req, "dropped packet not requested");

    // 4. routing error: P = (0,1) should have sent a packet for (0,3) North
    send_pkt(0, 3, -1, '0);
    chk(n_rerr == 1, "routing error of the previous router detected");
    take_pkt();
    chk(got_port == DIR_N && same_pkt(1) && got[0][12],
        "misrouted packet forwarded North with bypass and turn flags");

    // 5. East unavailable: packet for (3,1) bypasses South with the flag
    avail = 4'b1101;
    send_pkt(3, 1, -1, '0);
    take_pkt();
    chk(got_port == DIR_S && same_pkt(1), "bypass to the South with the bypass flag");
    // the packet of step 4 was a bypass too (its XY side, West, is the side
    // it came in by)
    chk(n_byp == 2, $sformatf("bypasses reported: %0d", n_byp));
    avail = 4'b1111;

    // 6. Occ after two waiting packets; looped packets reported
    send_pkt(3, 1, -1, '0);
    chk(!bwd_out.occ, "room left after one packet");
    send_pkt(3, 1, -1, '0);
    chk(bwd_out.occ, "Occ with two packets waiting");
    take_pkt();
    chk(!bwd_out.occ, "Occ clears when a packet leaves");
    take_pkt();
    loop_mode = 1;
    send_pkt(3, 1, -1, '0);
    chk(n_loop == 1, "looped packet reported");
    take_pkt();
    loop_mode = 0;
    chk(n_rerr == 1, "no routing error for good or looped packets");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
