// dmc_encoder: Decimal Matrix Code encoder for a 32-bit word.
//
// The word D[31:0] is cut into eight 4-bit symbols arranged in a matrix of
// two rows (symbols 0-3 = D[15:0], symbols 4-7 = D[31:16]) and four columns.
// Horizontal check bits are 5-bit decimal (integer) sums of two symbols of a
// row:  H[4:0]   = D[3:0]   + D[11:8]     H[9:5]   = D[7:4]   + D[15:12]
//       H[14:10] = D[19:16] + D[27:24]    H[19:15] = D[23:20] + D[31:28]
// Vertical check bits are the XOR of the two rows: V[i] = D[i] ^ D[i+16].
// All of this is the document's encoder. The codeword is {V, H, D}, 68 bits;
// the order of the fields inside it is this design's choice.
// Purely combinational; the decoder reuses this block to recompute the
// check bits of a received word (encoder reuse).
module dmc_encoder
  import rkt_pkg::*;
(
  input  logic [DATA_W-1:0] data,  // information bits D
  output logic [H_W-1:0]    h,     // horizontal check bits H
  output logic [V_W-1:0]    v,     // vertical check bits V
  output logic [CW_W-1:0]   cw     // codeword {V, H, D}
);

  always_comb begin
    h[4:0]   = {1'b0, data[3:0]}   + {1'b0, data[11:8]};
    h[9:5]   = {1'b0, data[7:4]}   + {1'b0, data[15:12]};
    h[14:10] = {1'b0, data[19:16]} + {1'b0, data[27:24]};
    h[19:15] = {1'b0, data[23:20]} + {1'b0, data[31:28]};
    v        = data[15:0] ^ data[31:16];
    cw       = {v, h, data};
  end

endmodule
