// tb_packet_fifo: randomized self-checking test of the packet FIFO.
// A queue model keeps three lists: committed unread flits, flits read but
// not yet freed, and flits written but not yet committed. Every cycle random
// write / commit / abort and read / commit / rewind operations are applied
// to both, and rd_data, n_avail and n_free are compared with the model.
module tb_packet_fifo;
  localparam int DEPTH = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        wr_en, wr_commit, wr_abort, rd_en, rd_commit, rd_rewind;
  logic [15:0] wr_data, rd_data;
  logic [3:0]  n_avail, n_free;
  int checks = 0, failures = 0;
  int n_rewind = 0, n_abort = 0;

  packet_fifo #(.WIDTH(16), .DEPTH(DEPTH)) dut (.clk, .rst_n, .wr_en, .wr_data,
    .wr_commit, .wr_abort, .rd_en, .rd_data, .rd_commit, .rd_rewind, .n_avail, .n_free);

  logic [15:0] q_com[$], q_rd[$], q_wr[$];

  task automatic chk(bit c, string msg);
    checks++;
    if (!c) begin
      failures++;
      $display("FAIL %s at %0t", msg, $time);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    {wr_en, wr_commit, wr_abort, rd_en, rd_commit, rd_rewind} = '0;
    wr_data = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 5000; cyc++) begin
      @(negedge clk);
      // compare state
      chk(n_avail == 4'(q_com.size()), "n_avail");
      chk(n_free == 4'(DEPTH - q_com.size() - q_rd.size() - q_wr.size()), "n_free");
      if (q_com.size() > 0) chk(rd_data == q_com[0], "rd_data");
      // choose operations
      wr_abort  = ($urandom_range(0, 19) == 0);
      wr_en     = !wr_abort && (n_free != 0) && $urandom_range(0, 1);
      wr_data   = 16'($urandom);
      wr_commit = !wr_abort && ($urandom_range(0, 3) == 0);
      rd_rewind = ($urandom_range(0, 15) == 0);
      rd_en     = !rd_rewind && (q_com.size() > 0) && $urandom_range(0, 1);
      rd_commit = !rd_rewind && ($urandom_range(0, 3) == 0);
      // model
      @(posedge clk);
      #1;
      if (wr_abort) begin
        q_wr.delete();
        n_abort++;
      end else begin
        if (wr_en) q_wr.push_back(wr_data);
        if (wr_commit) begin
          foreach (q_wr[i]) q_com.push_back(q_wr[i]);
          q_wr.delete();
        end
      end
      if (rd_rewind) begin
        for (int i = q_rd.size() - 1; i >= 0; i--) q_com.push_front(q_rd[i]);
        q_rd.delete();
        n_rewind++;
      end else begin
        if (rd_en) q_rd.push_back(q_com.pop_front());
        if (rd_commit) q_rd.delete();
      end
    end
    chk(n_rewind > 0 && n_abort > 0, "rewind and abort exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
