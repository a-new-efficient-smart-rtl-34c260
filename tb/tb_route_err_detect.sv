// tb_route_err_detect: self-checking test of the routing error detection.
// Builds the previous router P next to the checking router, a destination,
// and a decision of P: its XY choice (never an error), a declared bypass
// around an unavailable diagonal router (accepted), a declared bypass of
// an available diagonal router (error), an undeclared deviation (error), a
// declared bypass whose XY target is two hops away (accepted), a declared
// bypass with the turn flag (accepted), and a packet
// forwarded by its destination router (error).
module tb_route_err_detect;
  import rkt_pkg::*;

  logic [3:0] my_x, my_y, diag_unavail;
  dir_e       in_port;
  hdr_t       hdr;
  logic       check_en, err;
  int checks = 0, failures = 0;
  int seen[7];

  route_err_detect dut (.my_x, .my_y, .in_port, .hdr, .check_en, .diag_unavail, .err);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (seen[k]) seen[k] = 0;
    for (int n = 0; n < 20000; n++) begin
      int x, y, px, py, dx, dy, pref, taken, ddx, ddy, di;
      bit exp_err;
      int kind;
      x = $urandom_range(2, 13); y = $urandom_range(2, 13);
      my_x = 4'(x); my_y = 4'(y);
      in_port = dir_e'($urandom_range(0, 3));
      px = x + ((in_port == DIR_E) ? 1 : (in_port == DIR_W) ? -1 : 0);
      py = y + ((in_port == DIR_N) ? 1 : (in_port == DIR_S) ? -1 : 0);
      dx = $urandom_range(0, 15); dy = $urandom_range(0, 15);
      if ($urandom_range(0, 9) == 0) begin dx = px; dy = py; end
      hdr = hdr_t'($urandom);
      hdr.dst_x = 4'(dx); hdr.dst_y = 4'(dy);
      diag_unavail = 4'($urandom);
      check_en = 1'b1;
      pref  = (dx > px) ? 1 : (dx < px) ? 3 : (dy > py) ? 0 : 2;
      taken = (int'(in_port) + 2) % 4;
      // XY target of P, relative to this router
      ddx = px - x + ((pref == 1) ? 1 : (pref == 3) ? -1 : 0);
      ddy = py - y + ((pref == 0) ? 1 : (pref == 2) ? -1 : 0);
      di  = (ddx == 1 && ddy == 1) ? 0 : (ddx == 1 && ddy == -1) ? 1 :
            (ddx == -1 && ddy == -1) ? 2 : (ddx == -1 && ddy == 1) ? 3 : -1;
      if (dx == px && dy == py)                 begin exp_err = 1; kind = 0; end
      else if (pref == taken)                   begin exp_err = 0; kind = 1; end
      else if (!hdr.bypass)                     begin exp_err = 1; kind = 2; end
      else if (hdr.turn)                        begin exp_err = 0; kind = 6; end
      else if (di < 0)                          begin exp_err = 0; kind = 3; end
      else if (diag_unavail[di])                begin exp_err = 0; kind = 4; end
      else                                      begin exp_err = 1; kind = 5; end
      seen[kind]++;
      #1;
      checks++;
      if (err !== exp_err) begin
        failures++;
        $display("FAIL me(%0d,%0d) in=%0d dst(%0d,%0d) byp=%b diag=%b kind=%0d err=%b",
                 x, y, in_port, dx, dy, hdr.bypass, diag_unavail, kind, err);
      end
      check_en = 1'b0;
      #1;
      checks++;
      if (err !== 1'b0) begin
        failures++;
        $display("FAIL err without check_en");
      end
    end
    for (int k = 0; k < 6; k++) begin
      checks++;
      if (seen[k] == 0) begin
        failures++;
        $display("FAIL case %0d never produced", k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
