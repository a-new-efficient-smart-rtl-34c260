// route_logic: adaptive XY routing decision of one input port.
//
// The router has no local port: a module sits on a side of a router, so a
// destination is a router (dst_x, dst_y) plus the side dst_port. At the
// destination router the packet leaves by dst_port. Elsewhere the XY
// (dimension-order) direction is preferred. When that neighbour is
// unavailable (faulty, being reconfigured, or off the mesh) the packet takes
// the other productive direction, then a direction perpendicular to the XY
// one, then the direction opposite to it; the port the packet came in by is
// never chosen. Any choice other than the XY one is reported as a bypass,
// which the router writes into the header for the next router's routing
// error check, together with a turn flag when the bypass was forced because
// the XY side is the side the packet came in by. The document bases its routing on XY with turn-model bypasses
// but does not give the rule; this order of fall-backs is this design's.
//
// inj_fault (fault injection for validation) makes the block behave like a
// faulty routing logic that turns the XY choice one step clockwise
// (e.g. a packet for the East leaves to the South) without flagging a bypass.
// Purely combinational. Only the destination fields of the header are read;
// the other header bits pass the block unused by design.
module route_logic
  import rkt_pkg::*;
(
  input  logic [COORD_W-1:0] my_x,
  input  logic [COORD_W-1:0] my_y,
  input  hdr_t               hdr,
  input  dir_e               in_port,
  input  logic [NPORTS-1:0]  avail,     // neighbour router usable, per direction
  input  logic               inj_fault,
  output logic               out_valid, // a usable output was found
  output dir_e               out_port,
  output logic               bypass,
  output logic               turn       // bypass because XY points back to in_port
);

  dir_e pref, second, perp_a, perp_b, back;
  logic has_second;
  logic at_dst;

  function automatic logic usable(dir_e d, dir_e in_p, logic [NPORTS-1:0] av);
    return av[d] && (d != in_p);
  endfunction

  always_comb begin
    at_dst     = (hdr.dst_x == my_x) && (hdr.dst_y == my_y);
    pref       = xy_dir(my_x, my_y, hdr.dst_x, hdr.dst_y);
    has_second = (hdr.dst_x != my_x) && (hdr.dst_y != my_y);
    second     = (hdr.dst_y > my_y) ? DIR_N : DIR_S;
    perp_a     = dir_e'(pref + 2'd1);
    perp_b     = dir_e'(pref + 2'd3);
    back       = opposite(pref);

    out_valid = 1'b1;
    bypass    = 1'b0;
    turn      = 1'b0;
    out_port  = pref;
    if (at_dst) begin
      out_port = hdr.dst_port;
    end else if (inj_fault) begin
      out_port = dir_e'(pref + 2'd1);
    end else if (usable(pref, in_port, avail)) begin
      out_port = pref;
    end else begin
      bypass = 1'b1;
      turn   = (pref == in_port);
      if (has_second && usable(second, in_port, avail))  out_port = second;
      else if (usable(perp_a, in_port, avail))           out_port = perp_a;
      else if (usable(perp_b, in_port, avail))           out_port = perp_b;
      else if (usable(back, in_port, avail))             out_port = back;
      else out_valid = 1'b0;
    end
  end

endmodule
