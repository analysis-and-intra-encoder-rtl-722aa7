// pg_pls: plane-mode parameter precalculation for 16x16 luma and chroma.
//
// Computes, once per block and ahead of prediction, the H.264 plane
// parameters from the neighbours (top[k] = p[k,-1], left[k] = p[-1,k],
// corner = p[-1,-1]):
//   16x16 : H = sum_{i=0..7} (i+1)(p[8+i,-1] - p[6-i,-1]), V likewise on
//           the left column; a = 16(p[-1,15] + p[15,-1]);
//           b = (5H + 32) >> 6; c = (5V + 32) >> 6.
//   chroma: the same over 4 taps around the 8-pixel edges,
//           a = 16(p[-1,7] + p[7,-1]); b = (34H + 32) >> 6, c likewise.
// The neighbour just outside the block edge (index -1) is the corner.
// Registered outputs one cycle after in_valid; pg_plane consumes them.
//
// The parameter equations are the standard's plane mode; splitting them
// from the per-pixel unit follows the encoder's plane-mode design, and the
// single register stage is this design's own choice.
//
// Lint note: the upper bits of the 24-bit slope intermediates bt and ct are
// unused because b and c always fit the 16-bit outputs. For the same
// reasons (a is 16 times a pixel sum, b and c are small) synthesis finds a
// few output bits constant.
module pg_pls
  import svc_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  logic               is_chroma,
  input  pix_t               top [16],
  input  pix_t               left [16],
  input  pix_t               corner,
  output logic               out_valid,
  output logic signed [15:0] out_a,
  output logic signed [15:0] out_b,
  output logic signed [15:0] out_c
);
  logic signed [19:0] hs, vs;
  logic signed [23:0] bt, ct;
  logic signed [15:0] a_n;

  function automatic logic signed [19:0] tap(input int idx, input pix_t side [16], input pix_t cr);
    return (idx < 0) ? 20'(cr) : 20'(side[idx]);
  endfunction

  always_comb begin
    int half;
    half = is_chroma ? 4 : 8;
    hs = '0;
    vs = '0;
    for (int i = 0; i < 8; i++) begin
      if (i < half) begin
        hs += 20'(i + 1) * (tap(half + i, top, corner)  - tap(half - 2 - i, top, corner));
        vs += 20'(i + 1) * (tap(half + i, left, corner) - tap(half - 2 - i, left, corner));
      end
    end
    if (is_chroma) begin
      a_n = 16'(16 * (int'(left[7]) + int'(top[7])));
      bt  = (24'(hs) * 24'sd34 + 24'sd32) >>> 6;
      ct  = (24'(vs) * 24'sd34 + 24'sd32) >>> 6;
    end else begin
      a_n = 16'(16 * (int'(left[15]) + int'(top[15])));
      bt  = (24'(hs) * 24'sd5 + 24'sd32) >>> 6;
      ct  = (24'(vs) * 24'sd5 + 24'sd32) >>> 6;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_a <= '0;
      out_b <= '0;
      out_c <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_a <= a_n;
        out_b <= 16'(bt);
        out_c <= 16'(ct);
      end
    end
  end
endmodule
