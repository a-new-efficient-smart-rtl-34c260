// tb_rkt_fir: maximum flit injection rate (FIRmax) of the RKT-NoC for the
// three mesh sizes the document evaluates: 1x1 with 4 modules, 3x3 with 12
// and 4x4 with 16, every module sending to the module on the opposite side.
// The document reports FIRmax = 0.369 for every size. In this design one
// packet per link is in flight under the Ack/Nack flow control, so the rate
// is set by one link's cycle: PKT_FLITS cycles of flits, then the Ack
// round trip (output register, loopback registers, two DMC stages, Ack
// register) and the next SEND decision. Checks: 3x3 and 4x4 reach the same
// rate (no congestion, as the pattern is meant to give; the router-to-router
// link sets it), 1x1 (links to modules only) is not slower, every rate is
// at least 0.25 flit per cycle per module, and no packet reaches a wrong
// module. The measured rates are printed.
module tb_rkt_fir;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int   fir [3], bad [3];
  logic done [3];

  fir_mesh #(.W(1), .H(1)) u_1x1 (.clk, .rst_n, .fir_milli(fir[0]), .bad(bad[0]), .done(done[0]));
  fir_mesh #(.W(3), .H(3)) u_3x3 (.clk, .rst_n, .fir_milli(fir[1]), .bad(bad[1]), .done(done[1]));
  fir_mesh #(.W(4), .H(4)) u_4x4 (.clk, .rst_n, .fir_milli(fir[2]), .bad(bad[2]), .done(done[2]));

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
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (!(done[0] && done[1] && done[2])) @(posedge clk);
    $display("FIRmax 1x1 = 0.%03d, 3x3 = 0.%03d, 4x4 = 0.%03d flit/cycle/module", fir[0], fir[1], fir[2]);
    for (int s = 0; s < 3; s++) begin
      chk(fir[s] >= 250, $sformatf("size %0d: FIR 0.%03d below 0.250", s, fir[s]));
      chk(bad[s] == 0, $sformatf("size %0d: %0d packets at a wrong module", s, bad[s]));
    end
    // 3x3 and 4x4 are limited by the same router-to-router link cycle; in the
    // 1x1 mesh every link ends at a module, whose Ack comes sooner
    chk(fir[1] - fir[2] <= 5 && fir[2] - fir[1] <= 5, "FIRmax the same for 3x3 and 4x4");
    chk(fir[0] + 5 >= fir[1], "1x1 at least as fast as the larger meshes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
