// tb_route_logic: self-checking test of the adaptive XY routing decision.
// For random router positions in a 16x16 coordinate space, destinations,
// arrival sides and availability masks the output is compared with a
// reference that lists the candidate sides in order (XY, other productive,
// the two perpendicular ones, the opposite one) and takes the first usable.
// Also checks delivery at the destination and the injected routing fault.
module tb_route_logic;
  import rkt_pkg::*;

  logic [3:0] my_x, my_y, avail;
  hdr_t       hdr;
  dir_e       in_port, out_port;
  logic       inj_fault, out_valid, bypass, turn;
  int checks = 0, failures = 0;
  int n_bypass = 0, n_blocked = 0;

  route_logic dut (.my_x, .my_y, .hdr, .in_port, .avail, .inj_fault, .out_valid, .out_port, .bypass, .turn);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 20000; n++) begin
      int  x, y, dx, dy;
      int  cand[5];
      int  ncand;
      int  e_port;
      bit  e_valid, e_bypass, e_turn;
      x = $urandom_range(0, 15); y = $urandom_range(0, 15);
      dx = ($urandom_range(0, 3) == 0) ? x : $urandom_range(0, 15);
      dy = ($urandom_range(0, 3) == 0) ? y : $urandom_range(0, 15);
      my_x = 4'(x); my_y = 4'(y);
      hdr = hdr_t'($urandom);
      hdr.dst_x = 4'(dx); hdr.dst_y = 4'(dy);
      in_port   = dir_e'($urandom_range(0, 3));
      avail     = 4'($urandom);
      inj_fault = ($urandom_range(0, 9) == 0);
      #1;
      // reference
      e_valid = 1; e_bypass = 0; e_turn = 0;
      if (dx == x && dy == y) begin
        e_port = int'(hdr.dst_port);
      end else begin
        int pref;
        pref = (dx > x) ? 1 : (dx < x) ? 3 : (dy > y) ? 0 : 2;
        ncand = 0;
        cand[ncand++] = pref;
        if (dx != x && dy != y) cand[ncand++] = (dy > y) ? 0 : 2;
        cand[ncand++] = (pref + 1) % 4;
        cand[ncand++] = (pref + 3) % 4;
        cand[ncand++] = (pref + 2) % 4;
        if (inj_fault) begin
          e_port = (pref + 1) % 4;
        end else begin
          e_valid = 0;
          e_port  = pref;
          for (int k = 0; k < ncand; k++)
            if (!e_valid && avail[cand[k]] && cand[k] != int'(in_port)) begin
              e_valid  = 1;
              e_port   = cand[k];
              e_bypass = (k != 0);
            end
          if (!e_valid) e_bypass = 1;
          e_turn = e_bypass && (pref == int'(in_port));
        end
      end
      if (e_bypass) n_bypass++;
      if (!e_valid) n_blocked++;
      checks++;
      if (out_valid !== e_valid || bypass !== e_bypass || turn !== e_turn || (e_valid && int'(out_port) != e_port)) begin
        failures++;
        $display("FAIL (%0d,%0d)->(%0d,%0d) in=%0d av=%b: got v%b p%0d b%b exp v%b p%0d b%b",
                 x, y, dx, dy, in_port, avail, out_valid, out_port, bypass, e_valid, e_port, e_bypass);
      end
    end
    checks++;
    if (n_bypass == 0 || n_blocked == 0) begin
      failures++;
      $display("FAIL bypass or blocked case never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
