// tb_rkt_control: self-checking test of the crossbar arbitration.
// Four inputs hold packets (flit k of input i carries i*256+k) and request
// outputs. Checks: a packet is moved as PKT_FLITS consecutive flits with
// out_last on the last, flits arrive in order from a single input, every
// input is served once per request even when all four want the same
// output, inputs that keep requesting one output get equal shares
// (round robin, no starvation), an output without room grants
// nothing, and two inputs can use two outputs at the same time.
module tb_rkt_control;
  import rkt_pkg::*;
  localparam int PF = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [3:0]  req, xfer, out_room, out_wr, out_last;
  dir_e        req_port [4];
  logic [31:0] in_data  [4];
  logic [31:0] out_data [4];
  int          sent [4];       // flits sent by each input in the current packet
  int checks = 0, failures = 0;
  int served [4];
  int parallel_seen = 0;

  rkt_control #(.PKT_FLITS(PF)) dut (.clk, .rst_n, .req, .req_port, .in_data, .xfer,
    .out_room, .out_wr, .out_last, .out_data);

  always_comb for (int i = 0; i < 4; i++) in_data[i] = 32'(i * 256 + sent[i]);

  // input model: request until granted, then stream
  // xfer is sampled at the falling edge and acted upon at the rising edge,
  // like a register of the input port would
  bit want [4];
  logic [3:0] xs;
  always @(negedge clk) xs <= xfer;
  always @(posedge clk) begin
    for (int i = 0; i < 4; i++) begin
      if (xs[i]) begin
        if (sent[i] == PF - 1) begin sent[i] <= 0; served[i]++; end
        else sent[i] <= sent[i] + 1;
        want[i] <= 0;
      end
    end
  end
  always_comb for (int i = 0; i < 4; i++) req[i] = want[i] && sent[i] == 0 && !xfer_hold[i];
  bit xfer_hold [4];
  always @(posedge clk) for (int i = 0; i < 4; i++) xfer_hold[i] <= xs[i] && sent[i] != PF - 1;

  // output checker
  int exp_k [4];
  int src_i [4];
  always @(negedge clk) begin
    int act;
    act = 0;
    for (int o = 0; o < 4; o++) begin
      if (out_wr[o]) begin
        act++;
        if (exp_k[o] == 0) src_i[o] = int'(out_data[o][15:8]);
        checks++;
        if (out_data[o] != 32'(src_i[o] * 256 + exp_k[o]) || (out_last[o] != (exp_k[o] == PF - 1))
            || !out_room_q[o] && exp_k[o] == 0) begin
          failures++;
          $display("FAIL out %0d data %h k %0d last %b", o, out_data[o], exp_k[o], out_last[o]);
        end
        exp_k[o] = (exp_k[o] + 1) % PF;
      end
    end
    if (act >= 2) parallel_seen++;
  end
  logic [3:0] out_room_q;
  assign out_room_q = out_room;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wait_idle();
    int guard = 0;
    @(posedge clk);
    while ((want[0] || want[1] || want[2] || want[3] || xfer != 0) && guard < 500) begin
      @(posedge clk); guard++;
    end
    @(posedge clk); #1;
  endtask

  initial begin
    for (int i = 0; i < 4; i++) begin
      sent[i] = 0; want[i] = 0; req_port[i] = DIR_N; served[i] = 0;
      exp_k[i] = 0; src_i[i] = 0; xfer_hold[i] = 0;
    end
    xs = '0;
    out_room = '1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // all four inputs want output E
    @(posedge clk); #1;
    for (int i = 0; i < 4; i++) begin want[i] = 1; req_port[i] = DIR_E; end
    wait_idle();
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (served[i] != 1) begin failures++; $display("FAIL input %0d served %0d", i, served[i]); end
    end
    // output without room
    out_room[2] = 0;
    want[1] = 1; req_port[1] = DIR_S;
    repeat (20) @(posedge clk); #1;
    checks++;
    if (served[1] != 1) begin failures++; $display("FAIL granted without room"); end
    out_room[2] = 1;
    wait_idle();
    checks++;
    if (served[1] != 2) begin failures++; $display("FAIL not granted after room"); end
    // all four inputs keep requesting output W: round robin serves them in
    // turn, so their packet counts stay within one of each other
    begin
      int s0 [4];
      int mx, mn;
      for (int i = 0; i < 4; i++) s0[i] = served[i];
      for (int n = 0; n < 200; n++) begin
        @(posedge clk); #1;
        for (int i = 0; i < 4; i++)
          if (!want[i] && sent[i] == 0 && !xfer_hold[i]) begin
            want[i] = 1; req_port[i] = DIR_W;
          end
      end
      wait_idle();
      mx = 0; mn = 1000;
      for (int i = 0; i < 4; i++) begin
        if (served[i] - s0[i] > mx) mx = served[i] - s0[i];
        if (served[i] - s0[i] < mn) mn = served[i] - s0[i];
      end
      checks++;
      if (mn < 5 || mx - mn > 1) begin
        failures++; $display("FAIL unfair service under contention: min %0d max %0d", mn, mx);
      end
    end
    // random traffic
    for (int n = 0; n < 200; n++) begin
      @(posedge clk); #1;
      for (int i = 0; i < 4; i++)
        if (!want[i] && sent[i] == 0 && !xfer_hold[i] && $urandom_range(0, 2) == 0) begin
          want[i] = 1; req_port[i] = dir_e'($urandom_range(0, 3));
        end
      out_room = 4'($urandom) | 4'b1010;
    end
    out_room = '1;
    wait_idle();
    checks++;
    if (parallel_seen == 0) begin failures++; $display("FAIL no parallel transfers"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
