// tb_output_port: self-checking test of the output buffer and its state
// machine.
// Checks, against a DMC encoder written here from the code's equations:
//   - a packet is held while the receiver shows Occ and sent once it clears;
//   - the PKT_FLITS codewords leave on consecutive cycles, each the DMC
//     codeword of its flit, the first two cycles after the edge that
//     writes the last flit (one cycle to decide SEND, one output register);
//   - Ack frees the packet (ev_sent, has_room back), Nack sends the same
//     packet again (ev_resend) and nothing else is sent while waiting;
//   - has_room drops when OUT_PKTS packets are buffered; sending is high
//     exactly while flits are read.
// Stimulus is applied with non-blocking assignments after a rising edge,
// outputs are sampled at the falling edge.
module tb_output_port;
  import rkt_pkg::*;
  localparam int PF = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic              wr_en, wr_last, has_room, sending, ev_sent, ev_resend;
  logic [DATA_W-1:0] wr_data;
  link_fwd_t         fwd_out;
  link_bwd_t         bwd_in;

  output_port #(.PKT_FLITS(PF), .OUT_PKTS(2)) dut (
    .clk, .rst_n, .wr_en, .wr_data, .wr_last, .has_room, .sending,
    .fwd_out, .bwd_in, .ev_sent, .ev_resend
  );

  int checks = 0, failures = 0;
  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s (t=%0t)", m, $time); end
  endtask

  // reference DMC encoder: H = sums of symbol pairs, V = row-0 xor row-1
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

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // link monitor
  logic [CW_W-1:0] rx_cw [64];
  int              rx_cyc [64];
  int              n_rx = 0, n_sent = 0, n_resend = 0;
  int              bad_send = 0;
  initial for (int i = 0; i < 64; i++) begin rx_cw[i] = '0; rx_cyc[i] = 0; end
  always @(negedge clk) if (rst_n) begin
    if (fwd_out.valid && n_rx < 64) begin
      rx_cw[n_rx]  = fwd_out.cw;
      rx_cyc[n_rx] = cyc;
      n_rx++;
    end
    if (ev_sent) n_sent++;
    if (ev_resend) n_resend++;
  end
  // sending is high in the cycle before each flit appears
  logic sending_d = 0;
  always @(posedge clk) sending_d <= sending;
  always @(negedge clk) if (rst_n && (fwd_out.valid != sending_d)) bad_send++;

  logic [31:0] pay [4][PF];
  int          t_last;

  task automatic write_pkt(int id);
    for (int k = 0; k < PF; k++) begin
      @(posedge clk);
      wr_en   <= 1'b1;
      wr_data <= pay[id][k];
      wr_last <= (k == PF - 1);
    end
    @(posedge clk);             // the last flit is written (committed) here
    wr_en   <= 1'b0;
    wr_last <= 1'b0;
    @(negedge clk);
    t_last = cyc;
  endtask

  task automatic pulse_ack(bit nack);
    @(posedge clk);
    if (nack) bwd_in.nack <= 1'b1; else bwd_in.ack <= 1'b1;
    @(posedge clk);
    bwd_in.ack  <= 1'b0;
    bwd_in.nack <= 1'b0;
  endtask

  task automatic expect_pkt(int first, int id, string what);
    bit ok;
    ok = 1;
    for (int k = 0; k < PF; k++) begin
      if (rx_cw[first + k] != ref_enc(pay[id][k])) ok = 0;
      if (rx_cyc[first + k] != rx_cyc[first] + k) ok = 0;
    end
    chk(ok, $sformatf("%s: %0d consecutive DMC codewords of packet %0d", what, PF, id));
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n0;
    wr_en = 0; wr_last = 0; wr_data = '0;
    bwd_in = '{occ: 1'b0, ack: 1'b0, nack: 1'b0};
    t_last = 0;
    for (int i = 0; i < 4; i++)
      for (int k = 0; k < PF; k++) pay[i][k] = $urandom;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(has_room && !fwd_out.valid, "empty after reset");

    // 1. latency with a free receiver
    write_pkt(0);
    repeat (8) @(negedge clk);
    chk(n_rx == PF, $sformatf("packet 0 sent, %0d flits", n_rx));
    chk(rx_cyc[0] - t_last == 2, $sformatf("first flit %0d cycles after the last write", rx_cyc[0] - t_last));
    expect_pkt(0, 0, "packet 0");

    // 2. nothing new while waiting; Nack resends the same packet
    write_pkt(1);
    repeat (10) @(negedge clk);
    chk(n_rx == PF, "no second packet while waiting for Ack/Nack");
    pulse_ack(1);
    repeat (8) @(negedge clk);
    chk(n_resend == 1, "Nack counted");
    chk(n_rx == 2 * PF, "packet resent after Nack");
    expect_pkt(PF, 0, "resent packet 0");

    // 3. Ack frees it, the next packet follows
    pulse_ack(0);
    repeat (8) @(negedge clk);
    chk(n_sent == 1, "Ack counted");
    chk(n_rx == 3 * PF, "packet 1 sent after Ack");
    expect_pkt(2 * PF, 1, "packet 1");

    // 4. Occ holds the port; buffer full drops has_room
    @(posedge clk); bwd_in.occ <= 1'b1;
    pulse_ack(0);
    write_pkt(2);
    write_pkt(3);
    @(negedge clk);
    chk(!has_room, "has_room low with two packets buffered");
    n0 = n_rx;
    repeat (20) @(negedge clk);
    chk(n_rx == n0, "held while the receiver is occupied");
    @(posedge clk); bwd_in.occ <= 1'b0;
    repeat (8) @(negedge clk);
    chk(n_rx == n0 + PF, "sent when Occ clears");
    expect_pkt(n0, 2, "packet 2");
    pulse_ack(0);
    repeat (2) @(negedge clk);
    chk(has_room, "has_room back after Ack");
    repeat (8) @(negedge clk);
    expect_pkt(n0 + PF, 3, "packet 3");
    pulse_ack(0);
    repeat (3) @(negedge clk);
    chk(n_sent == 4 && n_resend == 1, $sformatf("sent=%0d resend=%0d", n_sent, n_resend));
    chk(bad_send == 0, "sending high exactly one cycle before each flit");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
