// tb_dmc_decoder: self-checking test of the two-stage DMC decoder.
// Words are encoded here with an independent reference (integer symbol sums
// and row XOR) and sent one per cycle. Cases: no error; one to four flipped
// bits inside a single data symbol (must be corrected); flipped check bits
// only (data unchanged); flips in two symbols of the same column in both
// rows (must be flagged uncorrectable). The two-cycle latency is checked.
module tb_dmc_decoder;
  import rkt_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic              in_valid;
  logic [CW_W-1:0]   in_cw;
  logic              out_valid, out_err, out_corr, out_uncorr;
  logic [DATA_W-1:0] out_data;
  int checks = 0, failures = 0;

  dmc_decoder dut (.clk, .rst_n, .in_valid, .in_cw, .out_valid, .out_data,
                   .out_err, .out_corr, .out_uncorr);

  function automatic logic [67:0] ref_enc(logic [31:0] d);
    logic [19:0] h;
    logic [15:0] v;
    int pa[4] = '{0, 1, 4, 5};
    for (int g = 0; g < 4; g++)
      h[5*g +: 5] = 5'(int'(d[4*pa[g] +: 4]) + int'(d[4*(pa[g]+2) +: 4]));
    v = d[15:0] ^ d[31:16];
    return {v, h, d};
  endfunction

  // expected results, in order of sending
  typedef struct {
    logic [31:0] data;
    logic err, corr, uncorr;
  } exp_t;
  exp_t q[$];
  int   sent_cycle[$];
  int   cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic send(logic [67:0] cw, exp_t e);
    @(negedge clk);
    in_valid = 1'b1;
    in_cw    = cw;
    q.push_back(e);
    sent_cycle.push_back(cycle);
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      exp_t e;
      int   c;
      e = q.pop_front();
      c = sent_cycle.pop_front();
      checks++;
      if (cycle - c != 2) begin
        failures++;
        $display("FAIL latency %0d", cycle - c);
      end
      checks++;
      if (out_err !== e.err || out_uncorr !== e.uncorr ||
          (!e.uncorr && (out_data !== e.data || out_corr !== e.corr))) begin
        failures++;
        $display("FAIL data=%h exp %h err=%b/%b corr=%b/%b unc=%b/%b", out_data, e.data,
                 out_err, e.err, out_corr, e.corr, out_uncorr, e.uncorr);
      end
    end
  end

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    logic [67:0] cw;
    logic [3:0]  m;
    int s;
    in_valid = 0;
    in_cw    = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      d = $urandom;
      // clean word
      send(ref_enc(d), '{d, 1'b0, 1'b0, 1'b0});
      // error pattern inside one data symbol
      s  = $urandom_range(0, 7);
      m  = 4'($urandom_range(1, 15));
      cw = ref_enc(d);
      cw[4*s +: 4] ^= m;
      send(cw, '{d, 1'b1, 1'b1, 1'b0});
      // one flipped horizontal check bit
      cw = ref_enc(d);
      cw[32 + $urandom_range(0, 19)] ^= 1'b1;
      send(cw, '{d, 1'b1, 1'b0, 1'b0});
      // one flipped vertical check bit
      cw = ref_enc(d);
      cw[52 + $urandom_range(0, 15)] ^= 1'b1;
      send(cw, '{d, 1'b1, 1'b0, 1'b0});
      // same bit of two symbols in the same column, one per row
      s  = $urandom_range(0, 3);
      cw = ref_enc(d);
      cw[4*s]      ^= 1'b1;
      cw[4*s + 16] ^= 1'b1;
      send(cw, '{d, 1'b1, 1'b0, 1'b1});
    end
    repeat (5) @(posedge clk);
    checks++;
    if (q.size() != 0) begin
      failures++;
      $display("FAIL %0d words never came out", q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
