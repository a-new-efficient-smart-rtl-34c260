// rkt_pkg: shared constants and types of the RKT network-on-chip.
//
// A flit carries 32 data bits. On every link it travels as a 68-bit Decimal
// Matrix Code (DMC) codeword {V[15:0], H[19:0], D[31:0]}: 8 symbols of 4 bits
// arranged as 2 rows x 4 columns, 20 horizontal check bits (5-bit decimal sums
// of symbol pairs) and 16 vertical check bits (XOR of the two rows). The
// 32-bit word, the 4-bit symbols and the 20/16 check bit counts follow the
// document; the flit field layout of the header is this design's own choice.
//
// Directions are numbered N=0, E=1, S=2, W=3; the opposite of d is d^2.
// x grows towards East, y grows towards North. Diagonal neighbours are
// indexed NE=0, SE=1, SW=2, NW=3.
package rkt_pkg;

  localparam int unsigned DATA_W   = 32;            // data bits per flit
  localparam int unsigned H_W      = 20;            // horizontal check bits
  localparam int unsigned V_W      = 16;            // vertical check bits
  localparam int unsigned CW_W     = DATA_W + H_W + V_W; // 68-bit codeword
  localparam int unsigned COORD_W  = 4;             // mesh coordinate width
  localparam int unsigned NPORTS   = 4;             // N, E, S, W

  typedef enum logic [1:0] {
    DIR_N = 2'd0,
    DIR_E = 2'd1,
    DIR_S = 2'd2,
    DIR_W = 2'd3
  } dir_e;

  // Header flit (flit 0 of a packet), 32 bits.
  typedef struct packed {
    logic [COORD_W-1:0] dst_x;     // [31:28] destination router x
    logic [COORD_W-1:0] dst_y;     // [27:24] destination router y
    dir_e               dst_port;  // [23:22] side of the destination router the module sits on
    logic [COORD_W-1:0] src_x;     // [21:18]
    logic [COORD_W-1:0] src_y;     // [17:14]
    logic               bypass;    // [13] set by the last router if it left the XY path
    logic               turn;      // [12] with bypass: the XY side was the side the packet came in by
    logic [11:0]        tag;       // [11:0] free for the modules (packet id)
  } hdr_t;

  // Forward half of a link: one codeword per cycle.
  typedef struct packed {
    logic            valid;
    logic [CW_W-1:0] cw;
  } link_fwd_t;

  // Backward half of a link: flow control from the receiver.
  typedef struct packed {
    logic occ;   // receiver cannot take a whole packet now
    logic ack;   // last packet received correctly (one-cycle pulse)
    logic nack;  // last packet rejected, send it again (one-cycle pulse)
  } link_bwd_t;

  function automatic dir_e opposite(dir_e d);
    return dir_e'(d ^ 2'd2);
  endfunction

  // XY (dimension-order) choice from (x,y) towards (dx,dy); only meaningful
  // when the two positions differ.
  function automatic dir_e xy_dir(logic [COORD_W-1:0] x, logic [COORD_W-1:0] y,
                                  logic [COORD_W-1:0] dx, logic [COORD_W-1:0] dy);
    if (dx > x)      return DIR_E;
    else if (dx < x) return DIR_W;
    else if (dy > y) return DIR_N;
    else             return DIR_S;
  endfunction

endpackage
