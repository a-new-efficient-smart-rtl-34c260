// packet_fifo: flit FIFO with packet-level commit on both sides.
//
// Used as the input buffer and as the output buffer of every port of the
// router. Writes go to a speculative write pointer; wr_commit makes the
// flits written so far visible to the reader (a whole packet at a time,
// which gives store-and-forward behaviour) and wr_abort throws them away
// (a packet rejected by the error check). Reads advance a speculative read
// pointer; rd_commit frees the flits read so far (packet acknowledged) and
// rd_rewind moves the read pointer back so the packet is sent again
// (negative acknowledge). The document sizes the input buffer for two
// packets of four flits; the commit/rewind mechanism is this design's way of
// holding a packet until its Ack/Nack.
//
// rd_data shows the flit at the read pointer combinationally.
// n_avail: committed flits not yet read; n_free: slots not holding any flit.
module packet_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 8
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   wr_en,
  input  logic [WIDTH-1:0]       wr_data,
  input  logic                   wr_commit,
  input  logic                   wr_abort,
  input  logic                   rd_en,
  output logic [WIDTH-1:0]       rd_data,
  input  logic                   rd_commit,
  input  logic                   rd_rewind,
  output logic [$clog2(DEPTH+1)-1:0] n_avail,
  output logic [$clog2(DEPTH+1)-1:0] n_free
);

  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned CW = $clog2(DEPTH+1);

  logic [WIDTH-1:0] mem [DEPTH];
  // pointers carry one extra wrap bit
  logic [AW:0] wr_spec, wr_com, rd_spec, rd_com;

  function automatic logic [AW:0] inc(logic [AW:0] p);
    if (p[AW-1:0] == AW'(DEPTH-1)) return {~p[AW], {AW{1'b0}}};
    else                           return p + 1'b1;
  endfunction

  function automatic logic [CW-1:0] ptr_diff(logic [AW:0] a, logic [AW:0] b); // a - b
    if (a[AW] == b[AW]) return CW'(a[AW-1:0]) - CW'(b[AW-1:0]);
    else                return CW'(DEPTH) + CW'(a[AW-1:0]) - CW'(b[AW-1:0]);
  endfunction

  assign rd_data = mem[rd_spec[AW-1:0]];
  assign n_avail = ptr_diff(wr_com, rd_spec);
  assign n_free  = CW'(DEPTH) - ptr_diff(wr_spec, rd_com);

  logic [AW:0] wr_next, rd_next;
  assign wr_next = wr_en ? inc(wr_spec) : wr_spec;
  assign rd_next = rd_en ? inc(rd_spec) : rd_spec;

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_spec[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_spec <= '0;
      wr_com  <= '0;
      rd_spec <= '0;
      rd_com  <= '0;
    end else begin
      // a flit written in the same cycle as the commit belongs to the packet
      if (wr_abort) begin
        wr_spec <= wr_com;
      end else begin
        wr_spec <= wr_next;
        if (wr_commit) wr_com <= wr_next;
      end
      if (rd_rewind) begin
        rd_spec <= rd_com;
      end else begin
        rd_spec <= rd_next;
        if (rd_commit) rd_com <= rd_next;
      end
    end
  end

  // writing into a full buffer or reading an empty one is a protocol error
  assert property (@(posedge clk) disable iff (!rst_n) wr_en |-> n_free != 0)
    else $error("packet_fifo: write while full");
  assert property (@(posedge clk) disable iff (!rst_n) rd_en |-> n_avail != 0)
    else $error("packet_fifo: read while empty");

endmodule
