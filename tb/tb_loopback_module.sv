// tb_loopback_module: self-checking test of the per-side loopback module.
// Checks:
//   - normal mode: each direction of data is delayed by one register and the
//     Ack/Nack/Occ signals pass straight through in both directions;
//   - a pending change to loopback shows Occ to both the router and the
//     link at once, and loop_mode follows after GUARD cycles when idle;
//   - loopback mode: the router's outgoing codewords come back on its own
//     input one cycle later, nothing reaches the link, the link sees Occ and
//     the router's output sees its own input's Ack;
//   - the switch waits while the router's output is sending, until a packet
//     received from the link has had its Ack, and until a packet sent has had
//     its Ack (or ACK_WAIT cycles, then it is Nacked once);
//   - leaving loopback waits for the Ack of the last looped packet.
// Stimulus is applied with non-blocking assignments after a rising edge,
// outputs are sampled at the falling edge.
module tb_loopback_module;
  import rkt_pkg::*;
  localparam int ACK_WAIT = 24, GUARD = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic      unavailable_in, rtr_req_out, loop_mode;
  link_fwd_t rtr_data_out, rtr_data_in, link_data_out, link_data_in;
  link_bwd_t rtr_bwd_in, rtr_bwd_out, link_bwd_out, link_bwd_in;

  loopback_module #(.ACK_WAIT(ACK_WAIT), .GUARD(GUARD)) dut (
    .clk, .rst_n, .unavailable_in, .rtr_data_out, .rtr_req_out, .rtr_data_in,
    .rtr_bwd_in, .rtr_bwd_out, .link_data_out, .link_data_in, .link_bwd_out,
    .link_bwd_in, .loop_mode
  );

  int checks = 0, failures = 0;
  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s (t=%0t)", m, $time); end
  endtask

  int n_nack = 0, n_loop_cycles = 0;
  always @(negedge clk) if (rst_n) begin
    if (rtr_bwd_out.nack) n_nack++;
    if (loop_mode) n_loop_cycles++;
  end

  function automatic link_fwd_t flit(logic [CW_W-1:0] cw);
    return '{valid: 1'b1, cw: cw};
  endfunction

  // one router flit, then check where it went one cycle later
  task automatic send_rtr(logic [CW_W-1:0] cw, bit expect_loop, string what);
    @(posedge clk); rtr_data_out <= flit(cw);
    @(posedge clk); rtr_data_out <= '0;
    @(negedge clk);
    if (expect_loop)
      chk(rtr_data_in.valid && rtr_data_in.cw == cw && !link_data_out.valid, {what, ": looped back"});
    else
      chk(link_data_out.valid && link_data_out.cw == cw && !rtr_data_in.valid, {what, ": sent to the link"});
  endtask

  // one-cycle Ack from the router's input or from the link
  task automatic ack_rtr();
    @(posedge clk); rtr_bwd_in.ack <= 1'b1;
    @(posedge clk); rtr_bwd_in.ack <= 1'b0;
  endtask
  task automatic ack_link();
    @(posedge clk); link_bwd_in.ack <= 1'b1;
    @(posedge clk); link_bwd_in.ack <= 1'b0;
  endtask

  // cycles until loop_mode equals v (at most lim)
  task automatic wait_mode(bit v, int lim, output int n);
    n = 0;
    while (loop_mode != v && n < lim) begin @(negedge clk); n++; end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n, nk;
    logic [CW_W-1:0] cw;
    unavailable_in = 0; rtr_req_out = 0;
    rtr_data_out = '0; link_data_in = '0;
    rtr_bwd_in = '0; link_bwd_in = '0;
    n = 0; nk = 0; cw = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // 1. normal mode
    cw = {$urandom, $urandom, 4'($urandom)};
    send_rtr(cw, 0, "normal");
    @(posedge clk); link_data_in <= flit(~cw);
    @(posedge clk); link_data_in <= '0;
    @(negedge clk);
    chk(rtr_data_in.valid && rtr_data_in.cw == ~cw && !link_data_out.valid, "normal: link flit to the router");
    @(posedge clk); rtr_bwd_in <= '{occ: 1'b1, ack: 1'b1, nack: 1'b0};
    link_bwd_in <= '{occ: 1'b0, ack: 1'b0, nack: 1'b1};
    @(negedge clk);
    chk(link_bwd_out == '{occ: 1'b1, ack: 1'b1, nack: 1'b0}, "normal: router Occ/Ack to the link");
    chk(rtr_bwd_out == '{occ: 1'b0, ack: 1'b0, nack: 1'b1}, "normal: link Nack to the router");
    @(posedge clk); rtr_bwd_in <= '0; link_bwd_in <= '0;
    repeat (2) @(posedge clk);

    // 2. change to loopback, nothing outstanding
    @(posedge clk); unavailable_in <= 1'b1;
    @(negedge clk);
    chk(rtr_bwd_out.occ && link_bwd_out.occ && !loop_mode, "pending change shows Occ both ways");
    wait_mode(1, 40, n);
    chk(loop_mode && n >= GUARD - 1 && n <= GUARD + 1, $sformatf("loopback after %0d cycles", n));

    // 3. loopback mode
    cw = {$urandom, $urandom, 4'($urandom)};
    send_rtr(cw, 1, "loop");
    chk(link_bwd_out.occ, "link sees Occ in loopback");
    @(posedge clk); link_data_in <= flit(cw);
    @(posedge clk); link_data_in <= '0;
    @(negedge clk);
    chk(!rtr_data_in.valid, "link flits ignored in loopback");
    @(posedge clk); rtr_bwd_in.ack <= 1'b1;
    @(negedge clk);
    chk(rtr_bwd_out.ack && !link_bwd_out.ack, "own Ack returned to the router");
    @(posedge clk); rtr_bwd_in.ack <= 1'b0;

    // 4. leaving waits for the Ack of the last looped packet
    send_rtr(cw, 1, "loop 2");
    @(posedge clk); unavailable_in <= 1'b0;
    repeat (10) @(negedge clk);
    chk(loop_mode, "stays in loopback while a looped packet is unacknowledged");
    ack_rtr();
    wait_mode(0, 10, n);
    chk(!loop_mode, "normal mode after the Ack");
    send_rtr(cw, 0, "normal again");
    ack_link();

    // 5. output sending and a received packet hold the switch
    @(posedge clk); rtr_req_out <= 1'b1; unavailable_in <= 1'b1;
    repeat (12) @(negedge clk);
    chk(!loop_mode, "no switch while the router's output is sending");
    @(posedge clk); rtr_req_out <= 1'b0; link_data_in <= flit(cw);
    @(posedge clk); link_data_in <= '0;
    repeat (12) @(negedge clk);
    chk(!loop_mode, "no switch before the received packet's Ack");
    ack_rtr();
    wait_mode(1, 10, n);
    chk(loop_mode, "switch after the Ack of the received packet");
    @(posedge clk); unavailable_in <= 1'b0;
    wait_mode(0, 10, n);

    // 6. a packet sent and acknowledged late: no Nack, no duplicate
    nk = n_nack;
    send_rtr(cw, 0, "sent before the change");
    @(posedge clk); unavailable_in <= 1'b1;
    repeat (8) @(negedge clk);
    chk(!loop_mode, "waits for the Ack of the sent packet");
    ack_link();
    wait_mode(1, 30, n);
    chk(loop_mode && n_nack == nk, "late Ack: switch without Nack");
    @(posedge clk); unavailable_in <= 1'b0;
    wait_mode(0, 10, n);

    // 7. no Ack at all (dead neighbour): Nack after ACK_WAIT cycles
    nk = n_nack;
    send_rtr(cw, 0, "sent to a dead neighbour");
    @(posedge clk); unavailable_in <= 1'b1;
    wait_mode(1, 60, n);
    chk(loop_mode && n >= ACK_WAIT - 2 && n <= ACK_WAIT + 2,
        $sformatf("switch after %0d cycles without Ack", n));
    chk(n_nack == nk + 1, $sformatf("one Nack for the lost packet (%0d)", n_nack - nk));
    chk(n_loop_cycles > 0, "loopback mode used");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
