// costcal4816: edge intensities and SATD for 4x4, 8x8 and 16x16 blocks.
//
// Fed by tran48. For BLK_4X4 and BLK_16X16 a whole 4x4 block arrives in one
// beat (row-major) and is handled as in costcal416c. For BLK_8X8 the block
// arrives as four beats of column pairs (in_c[0..7] = column 2k rows 0..7,
// in_c[8..15] = column 2k+1, in_beat = k); partial intensities are kept in
// accumulation registers and the result is valid one cycle after beat 3.
// 8x8 categories (t_ij, i = row, j = column), high frequencies ignored:
//   DC = t00, V = t01..t05, H = t10..t50, D = t11,t22,t33,t44,t55,
//   DV = t12,t13,t14,t23,t24,t34, DH = t21,t31,t32,t41,t42,t43,
//   I_AC = all but t00, SATD = all 64.
//
// The 8x8 coefficient groups follow the TraDED intensity definitions
// (diagonal-vertical/-horizontal pairs up to frequency 4, the others up to
// 5). Accumulating four 16-coefficient beats matches the forward
// transform's output order, which is this design's own choice.
module costcal4816
  import svc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  blk_e       in_blk,
  input  logic [1:0] in_beat,
  input  coef_t      in_c [16],
  output logic       out_valid,
  output intens_t    out_it
);
  intens_t acc, part, it4;

  // intensities contributed by one column pair of an 8x8 block
  always_comb begin
    int i, j;
    cost_t a;
    part = '0;
    for (int k = 0; k < 16; k++) begin
      i = k % 8;
      j = 2 * int'(in_beat) + k / 8;
      a = cabs(in_c[k]);
      if (i == 0 && j == 0) part.dc += a;
      else                  part.ac += a;
      part.satd += a;
      if (i == 0 && j >= 1 && j <= 5) part.v += a;
      if (j == 0 && i >= 1 && i <= 5) part.h += a;
      if (i == j && i >= 1 && i <= 5) part.d += a;
      if (i >= 1 && i < j && j <= 4)  part.dv += a;
      if (j >= 1 && j < i && i <= 4)  part.dh += a;
    end
    it4 = intens4x4(in_c);
    if (in_blk == BLK_16X16) begin
      it4.dv = '0;
      it4.dh = '0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_it    <= '0;
      acc       <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        if (in_blk == BLK_8X8) begin
          if (in_beat == 2'd0) acc <= part;
          else begin
            acc.dc   <= acc.dc   + part.dc;
            acc.v    <= acc.v    + part.v;
            acc.h    <= acc.h    + part.h;
            acc.d    <= acc.d    + part.d;
            acc.dv   <= acc.dv   + part.dv;
            acc.dh   <= acc.dh   + part.dh;
            acc.ac   <= acc.ac   + part.ac;
            acc.satd <= acc.satd + part.satd;
          end
          if (in_beat == 2'd3) begin
            out_valid   <= 1'b1;
            out_it.dc   <= acc.dc   + part.dc;
            out_it.v    <= acc.v    + part.v;
            out_it.h    <= acc.h    + part.h;
            out_it.d    <= acc.d    + part.d;
            out_it.dv   <= acc.dv   + part.dv;
            out_it.dh   <= acc.dh   + part.dh;
            out_it.ac   <= acc.ac   + part.ac;
            out_it.satd <= acc.satd + part.satd;
          end
        end else begin
          out_valid <= 1'b1;
          out_it    <= it4;
        end
      end
    end
  end
endmodule
