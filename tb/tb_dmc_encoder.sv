// tb_dmc_encoder: self-checking test of the DMC encoder.
// Reference check bits are computed here symbol by symbol with integer
// arithmetic: H pair g (5 bits) = value of symbol a + value of symbol b with
// pairs (0,2), (1,3), (4,6), (5,7), and V[i] = D[i] xor D[i+16].
// Directed words (all zeros, all ones, one worked example) and 2000
// random words are checked.
module tb_dmc_encoder;
  import rkt_pkg::*;

  logic [DATA_W-1:0] data;
  logic [H_W-1:0]    h;
  logic [V_W-1:0]    v;
  logic [CW_W-1:0]   cw;
  int checks = 0, failures = 0;

  dmc_encoder dut (.data, .h, .v, .cw);

  function automatic int sym(logic [31:0] d, int s);
    return int'(d[4*s +: 4]);
  endfunction

  task automatic check_word(logic [31:0] d);
    int pa[4] = '{0, 1, 4, 5};
    logic [19:0] eh;
    logic [15:0] ev;
    data = d;
    #1;
    for (int g = 0; g < 4; g++) eh[5*g +: 5] = 5'(sym(d, pa[g]) + sym(d, pa[g] + 2));
    for (int i = 0; i < 16; i++) ev[i] = d[i] ^ d[i + 16];
    checks++;
    if (h !== eh || v !== ev || cw !== {ev, eh, d}) begin
      failures++;
      $display("FAIL d=%h h=%h exp %h v=%h exp %h", d, h, eh, v, ev);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check_word(32'h0000_0000);
    check_word(32'hFFFF_FFFF);
    // symbols 0..7 = 1..8: H = {6+8, 5+7, 2+4, 1+3} = {14, 12, 6, 4}
    check_word(32'h8765_4321);
    checks++;
    if (h !== {5'd14, 5'd12, 5'd6, 5'd4}) begin
      failures++;
      $display("FAIL worked example h=%h", h);
    end
    for (int n = 0; n < 2000; n++) check_word($urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
