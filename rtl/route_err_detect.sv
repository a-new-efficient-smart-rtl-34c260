// route_err_detect: checks the routing decision of the previous router.
//
// A packet that arrives on port p came from the neighbour P on side p, which
// sent it in direction opposite(p). This block recomputes P's XY choice for
// the header's destination and accepts the hop when:
//   - it is the XY choice of P, or
//   - P flagged a bypass with the turn flag (its XY side was the side the
//     packet came into P by, which P may not send back to), or
//   - P flagged a bypass in the header and P's XY neighbour is either
//     unavailable (that neighbour is one of this router's diagonal neighbours,
//     whose state arrives on the diagonal indications) or out of this
//     router's view (two hops away, opposite to P).
// A packet whose destination is P itself should have left P by its
// destination side and is also an error. Checks are made only for packets
// coming from a neighbour router (not for a module at the mesh edge and not
// for looped-back packets). The use of diagonal state indications and of
// extra routing information in the header follows the document; the exact
// acceptance rule is this design's.
// Combinational: err is valid in the cycle the header is presented. Only
// the destination fields and the bypass/turn flags of the header are read;
// the source and tag bits are unused by design.
module route_err_detect
  import rkt_pkg::*;
(
  input  logic [COORD_W-1:0] my_x,
  input  logic [COORD_W-1:0] my_y,
  input  dir_e               in_port,
  input  hdr_t               hdr,
  input  logic               check_en,     // header valid and sender is a router
  input  logic [3:0]         diag_unavail, // NE, SE, SW, NW neighbours unavailable
  output logic               err
);

  logic [COORD_W-1:0] px, py;
  dir_e taken, p_pref;
  logic [1:0] diag_idx;

  always_comb begin
    px = my_x;
    py = my_y;
    unique case (in_port)
      DIR_N: py = my_y + 1'b1;
      DIR_E: px = my_x + 1'b1;
      DIR_S: py = my_y - 1'b1;
      DIR_W: px = my_x - 1'b1;
    endcase
    taken  = opposite(in_port);
    p_pref = xy_dir(px, py, hdr.dst_x, hdr.dst_y);

    // diagonal reached from this router by going to side in_port, then to
    // side p_pref (p_pref perpendicular to in_port)
    unique case ({in_port, p_pref})
      {DIR_N, DIR_E}, {DIR_E, DIR_N}: diag_idx = 2'd0; // NE
      {DIR_S, DIR_E}, {DIR_E, DIR_S}: diag_idx = 2'd1; // SE
      {DIR_S, DIR_W}, {DIR_W, DIR_S}: diag_idx = 2'd2; // SW
      default:                        diag_idx = 2'd3; // NW
    endcase

    err = 1'b0;
    if (check_en) begin
      if ((px == hdr.dst_x) && (py == hdr.dst_y))
        err = 1'b1;                        // P was the destination
      else if (p_pref == taken)
        err = 1'b0;                        // plain XY hop
      else if (!hdr.bypass)
        err = 1'b1;                        // left XY without saying so
      else if (hdr.turn)
        err = 1'b0;                        // P could not send it back
      else if (p_pref == in_port)
        err = 1'b0;                        // XY neighbour of P out of view
      else
        err = !diag_unavail[diag_idx];     // bypass of an available router
    end
  end

endmodule
