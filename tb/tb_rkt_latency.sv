// tb_rkt_latency: average packet latency of the RKT-NoC under random
// traffic at the maximum injection rate, for the three mesh sizes the
// document evaluates (1x1 with 4 modules, 3x3 with 12, 4x4 with 16).
// Every module sends packets back to back to random other modules (see
// lat_mesh). The minimum, average and maximum latency of each size are
// printed, in cycles from the header entering the network to the header
// leaving it. The document gives the minimum latency per router crossed
// (eq. 1) but its table of average latencies is not reproduced here; the
// checks are those that follow from the design:
//   - no packet is faster than one router crossing (15 cycles);
//   - every packet sent is delivered, once, to the right module;
//   - the average grows with the mesh (more routers crossed on average);
//   - no packet waits unboundedly (maximum below 4000 cycles).
module tb_rkt_latency;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int RTR_MIN = 15;

  int     n [3], mn [3], mx [3], snt [3], dlv [3], bad [3];
  longint sm [3];
  logic   done [3];

  lat_mesh #(.W(1), .H(1)) u_1x1 (.clk, .rst_n, .n_pkt(n[0]), .lat_min(mn[0]), .lat_max(mx[0]),
    .lat_sum(sm[0]), .sent(snt[0]), .delivered(dlv[0]), .bad(bad[0]), .done(done[0]));
  lat_mesh #(.W(3), .H(3)) u_3x3 (.clk, .rst_n, .n_pkt(n[1]), .lat_min(mn[1]), .lat_max(mx[1]),
    .lat_sum(sm[1]), .sent(snt[1]), .delivered(dlv[1]), .bad(bad[1]), .done(done[1]));
  lat_mesh #(.W(4), .H(4)) u_4x4 (.clk, .rst_n, .n_pkt(n[2]), .lat_min(mn[2]), .lat_max(mx[2]),
    .lat_sum(sm[2]), .sent(snt[2]), .delivered(dlv[2]), .bad(bad[2]), .done(done[2]));

  int checks = 0, failures = 0;
  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int avg [3];
    string nm [3];
    nm[0] = "1x1"; nm[1] = "3x3"; nm[2] = "4x4";
    for (int s = 0; s < 3; s++) avg[s] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (!(done[0] && done[1] && done[2])) @(posedge clk);
    @(negedge clk);
    for (int s = 0; s < 3; s++) begin
      avg[s] = (n[s] > 0) ? int'(sm[s] / longint'(n[s])) : 0;
      $display("latency %s: packets=%0d min=%0d avg=%0d max=%0d cycles (sent=%0d delivered=%0d)",
               nm[s], n[s], mn[s], avg[s], mx[s], snt[s], dlv[s]);
      chk(n[s] > 0, $sformatf("%s: packets measured", nm[s]));
      chk(mn[s] >= RTR_MIN, $sformatf("%s: no packet below one router crossing (%0d)", nm[s], mn[s]));
      chk(dlv[s] == snt[s] && bad[s] == 0,
          $sformatf("%s: sent %0d, delivered %0d, wrong %0d", nm[s], snt[s], dlv[s], bad[s]));
      chk(mx[s] < 4000, $sformatf("%s: maximum latency %0d", nm[s], mx[s]));
    end
    chk(avg[0] <= avg[1] && avg[1] <= avg[2], "average latency grows with the mesh size");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
