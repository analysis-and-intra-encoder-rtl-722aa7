// pg4816: intra prediction generator for 8x8 (with reference pre-filtering),
// 4x4 and 16x16 vertical/horizontal prediction, 16 pixels per cycle.
//
// ref_load captures the neighbours of the current block: top[0..15]
// (p[0..15,-1]), left[0..7], corner, and their availability. In the same
// cycle the 8x8 reference pre-filter of H.264 is applied (3-tap smoothing
// along the top row, corner and left column, with the edge rules for
// missing neighbours; a missing top-right half is first replaced by
// p[7,-1]); raw and filtered edges are both kept.
// A request (in_valid) then returns, one cycle later:
//   BLK_8X8   - rows 2*in_row and 2*in_row+1 of the 8x8 prediction for
//               mode in_mode (0..8), from the filtered edges (DC: the
//               mean of the available filtered top / left samples, 128
//               when neither side is available);
//   BLK_4X4   - the whole 4x4 prediction (row-major) from the raw edges
//               top[0..7], left[0..3];
//   BLK_16X16 - mode 0 vertical / 1 horizontal of the 4x4 sub-block whose
//               neighbours were loaded.
// The pixel formulas are shared with pg416c (svc_pkg::pred_dir).
//
// Reference pre-filtering and the 16-pixel slices follow the encoder's
// 8x8 predictor. Producing the 8x8 DC value here, from the filtered edge as
// the standard requires, is this design's own choice.
module pg4816
  import svc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       ref_load,
  input  pix_t       top [16],
  input  pix_t       left [8],
  input  pix_t       corner,
  input  logic       top_ok,
  input  logic       left_ok,
  input  logic       corner_ok,
  input  logic       tr_ok,
  input  logic       in_valid,
  input  blk_e       in_blk,
  input  logic [3:0] in_mode,
  input  logic [1:0] in_row,
  output logic       out_valid,
  output pix_t       out_p [16]
);
  edge_t raw, flt;     // stored edges
  edge_t raw_n, flt_n; // edges being loaded
  pix_t  p [16];
  logic [3:0] m;
  pix_t  dc8, dc8_n;   // 8x8 DC value from the filtered edges

  // ---- reference capture and pre-filter
  always_comb begin
    pix_t t [16];
    for (int k = 0; k < 8; k++)  t[k] = top[k];
    for (int k = 8; k < 16; k++) t[k] = tr_ok ? top[k] : top[7];
    raw_n = '0;
    raw_n[EC] = corner;
    for (int k = 0; k < 16; k++) raw_n[EC+1+k] = t[k];
    for (int j = 0; j < 8; j++)  raw_n[EC-1-j] = left[j];
    flt_n = raw_n;
    if (top_ok) begin
      flt_n[EC+1] = corner_ok ? f3(corner, t[0], t[1])
                              : pix_t'((10'(t[0]) * 10'd3 + 10'(t[1]) + 10'd2) >> 2);
      for (int k = 1; k < 15; k++) flt_n[EC+1+k] = f3(t[k-1], t[k], t[k+1]);
      flt_n[EC+16] = pix_t'((10'(t[14]) + 10'(t[15]) * 10'd3 + 10'd2) >> 2);
    end
    if (corner_ok) begin
      if (top_ok && left_ok)  flt_n[EC] = f3(t[0], corner, left[0]);
      else if (top_ok)        flt_n[EC] = pix_t'((10'(corner) * 10'd3 + 10'(t[0]) + 10'd2) >> 2);
      else if (left_ok)       flt_n[EC] = pix_t'((10'(corner) * 10'd3 + 10'(left[0]) + 10'd2) >> 2);
    end
    if (left_ok) begin
      flt_n[EC-1] = corner_ok ? f3(corner, left[0], left[1])
                              : pix_t'((10'(left[0]) * 10'd3 + 10'(left[1]) + 10'd2) >> 2);
      for (int j = 1; j < 7; j++) flt_n[EC-1-j] = f3(left[j-1], left[j], left[j+1]);
      flt_n[EC-8] = pix_t'((10'(left[6]) + 10'(left[7]) * 10'd3 + 10'd2) >> 2);
    end
  end

  // ---- 8x8 DC from the filtered edges (the standard's Intra_8x8_DC)
  always_comb begin
    logic [11:0] st, sl;
    st = '0;
    sl = '0;
    for (int k = 0; k < 8; k++) begin
      st += 12'(flt_n[EC+1+k]);
      sl += 12'(flt_n[EC-1-k]);
    end
    if (top_ok && left_ok) dc8_n = pix_t'((st + sl + 12'd8) >> 4);
    else if (top_ok)       dc8_n = pix_t'((st + 12'd4) >> 3);
    else if (left_ok)      dc8_n = pix_t'((sl + 12'd4) >> 3);
    else                   dc8_n = 8'd128;
  end

  // ---- prediction
  always_comb begin
    for (int i = 0; i < 16; i++) p[i] = '0;
    m = in_mode;
    case (in_blk)
      BLK_8X8: begin
        for (int r = 0; r < 2; r++)
          for (int x = 0; x < 8; x++)
            p[8*r+x] = (in_mode == M_DC) ? dc8
                                         : pred_dir(in_mode, 1'b1, x, 2*int'(in_row)+r, flt);
      end
      BLK_16X16: begin
        m = (in_mode == 4'd1) ? M_H : M_V;
        for (int y = 0; y < 4; y++)
          for (int x = 0; x < 4; x++) p[4*y+x] = pred_dir(m, 1'b0, x, y, raw);
      end
      default: begin
        // 4x4: the top-right half of a 4x4 block is raw[EC+5..EC+8]
        for (int y = 0; y < 4; y++)
          for (int x = 0; x < 4; x++) p[4*y+x] = pred_dir(in_mode, 1'b0, x, y, raw);
      end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      raw <= '0;
      flt <= '0;
      dc8 <= '0;
      out_valid <= 1'b0;
      for (int i = 0; i < 16; i++) out_p[i] <= '0;
    end else begin
      if (ref_load) begin
        raw <= raw_n;
        flt <= flt_n;
        dc8 <= dc8_n;
      end
      out_valid <= in_valid;
      if (in_valid) out_p <= p;
    end
  end
endmodule
