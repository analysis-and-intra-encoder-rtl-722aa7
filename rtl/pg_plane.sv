// pg_plane: plane-mode prediction pixels from precalculated parameters.
//
// Given a, b, c from pg_pls and the position (bx, by) of a 4x4 piece inside
// the 16x16 block (bx, by = 0..3) or chroma block (0..1), returns the 16
// pixels of that piece, row-major, one cycle after in_valid:
//   pred(x, y) = clip255((a + b(x - xc) + c(y - yc) + 16) >> 5)
// with (x, y) the pixel position in the whole block and xc = yc = 7 for
// 16x16 and 3 for chroma (4:2:0).
//
// The equation is the standard's plane predictor, split from the parameter
// unit (pg_pls) as in the encoder's plane-mode design; computing one 4x4
// piece per request is this design's own choice.
module pg_plane
  import svc_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  logic               is_chroma,
  input  logic signed [15:0] a,
  input  logic signed [15:0] b,
  input  logic signed [15:0] c,
  input  logic [1:0]         bx,
  input  logic [1:0]         by,
  output logic               out_valid,
  output pix_t               out_p [16]
);
  pix_t p [16];
  always_comb begin
    int xc, xx, yy, v;
    xc = is_chroma ? 3 : 7;
    for (int y = 0; y < 4; y++)
      for (int x = 0; x < 4; x++) begin
        xx = 4 * int'(bx) + x - xc;
        yy = 4 * int'(by) + y - xc;
        v  = (int'(a) + int'(b) * xx + int'(c) * yy + 16) >>> 5;
        if (v < 0)        p[4*y+x] = 8'd0;
        else if (v > 255) p[4*y+x] = 8'd255;
        else              p[4*y+x] = pix_t'(v);
      end
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
