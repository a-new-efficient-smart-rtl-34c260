// dmc_decoder: Decimal Matrix Code checker and corrector, two pipeline stages.
//
// Stage 1 recomputes the check bits of the received data with a dmc_encoder
// (encoder reuse) and registers the horizontal syndromes dH_g = H'_g - H_g
// (decimal subtraction, one per symbol pair g = 0..3) and the vertical
// syndrome S = V' ^ V. Stage 2 flips data bit i of row 0 (i = 0..15) when
// S[i] is set and the horizontal syndrome of its symbol pair is non-zero,
// and likewise bit i+16 of row 1. It then re-encodes the corrected word and
// flags the word uncorrectable when a flipped word still disagrees with the
// received horizontal bits, when a column's error cannot be placed in one
// row, or when several symbol pairs disagree while the vertical syndrome is
// zero (errors in both rows of a column cancel in V). Errors only in the check bits leave the data as received.
// The decimal-sum / XOR detection and the flip rule follow the DMC method the
// document builds on; the exact uncorrectable test and the two-stage split
// (matching the document's two-cycle ECC latency) are this design's choice.
//
// Timing: in_valid/in_cw at cycle t give out_* at cycle t+2, one word per cycle.
module dmc_decoder
  import rkt_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [CW_W-1:0]   in_cw,
  output logic              out_valid,
  output logic [DATA_W-1:0] out_data,    // corrected data
  output logic              out_err,     // any syndrome non-zero
  output logic              out_corr,    // data bits were flipped
  output logic              out_uncorr   // error could not be corrected
);

  // ---------------- stage 1: syndromes ----------------
  logic [DATA_W-1:0] rx_d;
  logic [H_W-1:0]    rx_h, re_h;
  logic [V_W-1:0]    rx_v, re_v;
  logic [CW_W-1:0]   re_cw_unused;

  assign {rx_v, rx_h, rx_d} = in_cw;

  dmc_encoder u_reenc (.data(rx_d), .h(re_h), .v(re_v), .cw(re_cw_unused));

  logic [3:0]        dh_nz;   // horizontal syndrome non-zero per symbol pair
  always_comb begin
    for (int g = 0; g < 4; g++)
      dh_nz[g] = (re_h[5*g +: 5] - rx_h[5*g +: 5]) != 5'd0;
  end

  logic              s1_valid;
  logic [DATA_W-1:0] s1_d;
  logic [H_W-1:0]    s1_h;
  logic [3:0]        s1_dh_nz;
  logic [V_W-1:0]    s1_s;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      s1_d     <= '0;
      s1_h     <= '0;
      s1_dh_nz <= '0;
      s1_s     <= '0;
    end else begin
      s1_valid <= in_valid;
      s1_d     <= rx_d;
      s1_h     <= rx_h;
      s1_dh_nz <= dh_nz;
      s1_s     <= re_v ^ rx_v;
    end
  end

  // ---------------- stage 2: correction ----------------
  logic [DATA_W-1:0] flip;
  logic              ambiguous;
  logic [DATA_W-1:0] fixed_d;
  logic [H_W-1:0]    fix_h;
  logic [V_W-1:0]    fix_v_unused;
  logic [CW_W-1:0]   fix_cw_unused;
  logic              any_err, uncorr;

  logic [1:0] g0, g1;
  always_comb begin
    flip      = '0;
    ambiguous = 1'b0;
    g0        = 2'd0;
    g1        = 2'd2;
    for (int i = 0; i < 16; i++) begin
      // bits 0-3 and 8-11 of a row belong to pair 0 (row 0) / 2 (row 1),
      // bits 4-7 and 12-15 to pair 1 / 3
      g0 = ((i % 8) < 4) ? 2'd0 : 2'd1;
      g1 = g0 + 2'd2;
      if (s1_s[i]) begin
        flip[i]      = s1_dh_nz[g0];
        flip[i + 16] = s1_dh_nz[g1];
        if (s1_dh_nz[g0] && s1_dh_nz[g1]) ambiguous = 1'b1;
      end
    end
    fixed_d = s1_d ^ flip;
    any_err = (s1_dh_nz != 4'd0) || (s1_s != '0);
  end

  dmc_encoder u_chk (.data(fixed_d), .h(fix_h), .v(fix_v_unused), .cw(fix_cw_unused));

  // several pairs disagree while the rows XOR cleanly: errors in both rows
  // cancelled in V, which one check-bit error cannot explain
  logic multi_h;
  assign multi_h = (s1_s == '0) && ((s1_dh_nz & (s1_dh_nz - 4'd1)) != 4'd0);
  assign uncorr  = ambiguous || multi_h || ((flip != '0) && (fix_h != s1_h));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid  <= 1'b0;
      out_data   <= '0;
      out_err    <= 1'b0;
      out_corr   <= 1'b0;
      out_uncorr <= 1'b0;
    end else begin
      out_valid  <= s1_valid;
      out_data   <= fixed_d;
      out_err    <= s1_valid && any_err;
      out_corr   <= s1_valid && (flip != '0) && !uncorr;
      out_uncorr <= s1_valid && uncorr;
    end
  end

endmodule
