// tb_error_journal: self-checking test of the error journal.
// Drives per-packet reports and checks, against a counter model, that
// transient errors (interrupted by clean packets) never make a side
// permanent, that THRESH consecutive errors do, that bus, own-port and
// routing faults are told apart by the looped flag and the error kind,
// that port_disable follows, that the error counts are right and that
// clear empties the journal.
module tb_error_journal;
  import rkt_pkg::*;
  localparam int THRESH = 3;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       clear;
  logic [3:0] ev_pkt, ev_data_err, ev_route_err, ev_looped;
  logic [3:0] perm_bus, perm_port, perm_route, port_disable;
  logic [7:0] err_cnt [4];
  int checks = 0, failures = 0;

  error_journal #(.THRESH(THRESH)) dut (.clk, .rst_n, .clear, .ev_pkt, .ev_data_err,
    .ev_route_err, .ev_looped, .perm_bus, .perm_port, .perm_route, .port_disable, .err_cnt);

  task automatic pkt(int p, bit derr, bit rerr, bit looped);
    @(negedge clk);
    ev_pkt = '0; ev_data_err = '0; ev_route_err = '0; ev_looped = '0;
    ev_pkt[p] = 1; ev_data_err[p] = derr; ev_route_err[p] = rerr; ev_looped[p] = looped;
    @(negedge clk);
    ev_pkt = '0; ev_data_err = '0; ev_route_err = '0; ev_looped = '0;
  endtask

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
    clear = 0; ev_pkt = '0; ev_data_err = '0; ev_route_err = '0; ev_looped = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // side 0: transient bus errors, each followed by a clean packet
    for (int i = 0; i < 5; i++) begin
      pkt(0, 1, 0, 0); pkt(0, 1, 0, 0); pkt(0, 0, 0, 0);
    end
    chk(perm_bus == 0 && port_disable == 0, "transient errors made a side permanent");
    chk(err_cnt[0] == 10, "error count side 0");
    // side 1: permanent bus fault
    pkt(1, 1, 0, 0); pkt(1, 1, 0, 0);
    chk(perm_bus[1] == 0, "bus fault declared too early");
    pkt(1, 1, 0, 0);
    chk(perm_bus[1] == 1 && port_disable[1] == 1 && perm_port[1] == 0, "bus fault after THRESH");
    // side 1 looped packets clean: stays a bus fault only
    pkt(1, 0, 0, 1); pkt(1, 0, 0, 1); pkt(1, 0, 0, 1);
    chk(perm_port[1] == 0, "clean loopback blamed own port");
    // side 2: own port fault seen through the loopback
    pkt(2, 1, 0, 1); pkt(2, 1, 0, 1); pkt(2, 1, 0, 1);
    chk(perm_port[2] == 1 && perm_bus[2] == 0 && port_disable[2] == 1, "own port fault");
    // side 3: routing fault, with a clean packet breaking the first run
    pkt(3, 0, 1, 0); pkt(3, 0, 1, 0); pkt(3, 0, 0, 0);
    chk(perm_route[3] == 0, "routing fault too early");
    pkt(3, 0, 1, 0); pkt(3, 0, 1, 0); pkt(3, 0, 1, 0);
    chk(perm_route[3] == 1 && perm_bus[3] == 0, "routing fault");
    chk(err_cnt[3] == 5 && err_cnt[2] == 3 && err_cnt[1] == 3, "error counts");
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    chk(port_disable == 0 && err_cnt[1] == 0, "clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
