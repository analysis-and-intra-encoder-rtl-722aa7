// costcal416c: edge intensities and SATD for 4x4, 16x16 and chroma blocks.
//
// Takes one transformed block per cycle from tran4dc and produces the
// TraDED edge intensities (sums of absolute coefficients over the DC,
// vertical, horizontal, diagonal, diagonal-vertical and diagonal-horizontal
// categories) together with I_AC and the SATD. As in the design, I_AC and
// the SATD come from the same absolute-value adder tree (SATD = I_AC+I_DC).
//   BLK_4X4    - in_c is a 4x4 DCT block, row-major (index 4*i+j, i = row);
//                V = t01+t02+t03, H = t10+t20+t30, D = t11+t22+t33,
//                DV = t12+t13+t23, DH = t21+t31+t32.
//   BLK_16X16  - in_c is the 4x4 Hadamard of the sixteen DC terms; same
//                V, H, D sets, DV and DH are reported as zero.
//   BLK_CHROMA - Cb 2x2 Hadamard at indices 0,1,4,5 and Cr at 2,3,6,7;
//                each intensity is the Cb term plus the Cr term,
//                I_AC = V + H + D.
// The SATD is the plain sum of absolute transformed coefficients (a
// DCT-based SATD, no halving). One cycle latency, registered output.
//
// The coefficient groups follow the TraDED intensity definitions; the
// chroma grouping on the 2x2 DC terms and the registered output are this
// design's own choices.
module costcal416c
  import svc_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  blk_e    in_blk,
  input  coef_t   in_c [16],
  output logic    out_valid,
  output intens_t out_it
);
  intens_t it4, itc, nxt;

  always_comb begin
    it4 = intens4x4(in_c);
    itc = '0;
    itc.dc   = cabs(in_c[0]) + cabs(in_c[2]);
    itc.v    = cabs(in_c[1]) + cabs(in_c[3]);
    itc.h    = cabs(in_c[4]) + cabs(in_c[6]);
    itc.d    = cabs(in_c[5]) + cabs(in_c[7]);
    itc.ac   = itc.v + itc.h + itc.d;
    itc.satd = itc.ac + itc.dc;
    case (in_blk)
      BLK_CHROMA: nxt = itc;
      BLK_16X16: begin
        nxt    = it4;
        nxt.dv = '0;
        nxt.dh = '0;
      end
      default:    nxt = it4;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_it    <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) out_it <= nxt;
    end
  end
endmodule
