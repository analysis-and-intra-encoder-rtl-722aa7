// pg416c: intra prediction generator for 4x4 directional modes and the
// vertical / horizontal modes of 16x16 and chroma blocks.
//
// A whole 4x4 block (16 pixels, row-major) is produced per request, one
// cycle after in_valid. The neighbours (top A..H = top[0..7], left I..L =
// left[0..3], corner M) are laid out in one edge array; every predicted
// pixel is either a neighbour, a 2-tap average (a+b+1)>>1 or a 3-tap
// average (a+2b+c+2)>>2 along that array, which is the sharing the design's
// adder network exploits. If the top-right pixels are missing (tr_ok = 0)
// E..H are replaced by D, as H.264 requires.
// Modes: for BLK_4X4 the 4x4 mode numbers 0..8 except 2 (DC is pg_dc's);
// for BLK_16X16 mode 0 = vertical, 1 = horizontal; for BLK_CHROMA mode
// 2 = vertical, 1 = horizontal (the sub-block's own top/left slice is
// given). Other mode/size pairs give the vertical prediction.
module pg416c
  import svc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  blk_e       in_blk,
  input  logic [3:0] in_mode,
  input  pix_t       top [8],
  input  pix_t       left [4],
  input  pix_t       corner,
  input  logic       tr_ok,
  output logic       out_valid,
  output pix_t       out_p [16]
);
  edge_t      e;
  logic [3:0] m;
  pix_t       p [16];

  always_comb begin
    e = '0;
    e[EC] = corner;
    for (int k = 0; k < 4; k++) e[EC+1+k] = top[k];
    for (int k = 4; k < 8; k++) e[EC+1+k] = tr_ok ? top[k] : top[3];
    for (int k = 8; k < 16; k++) e[EC+1+k] = e[EC+8];
    for (int j = 0; j < 4; j++) e[EC-1-j] = left[j];
    case (in_blk)
      BLK_16X16:  m = (in_mode == 4'd1) ? M_H : M_V;
      BLK_CHROMA: m = (in_mode == 4'd1) ? M_H : M_V;
      default:    m = in_mode;
    endcase
    for (int y = 0; y < 4; y++)
      for (int x = 0; x < 4; x++) p[4*y+x] = pred_dir(m, 1'b0, x, y, e);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int i = 0; i < 16; i++) out_p[i] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) out_p <= p;
    end
  end
endmodule
