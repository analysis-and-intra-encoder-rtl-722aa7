// qe_norm_sub: quality-enhancement normalization and coefficient subtraction.
//
// A quality enhancement layer re-quantizes, with a smaller QP, what the
// layers below left of each transform coefficient. The lower layers' result
// exists as dequantized ("scaled") coefficients W', which live in a
// different scale than the forward-transform coefficients W; normalization
// maps them back, W' * N / 64, with N the position-dependent entry of the
// 4x4 (16, 25, 20) or 8x8 (64, 81, 25, 72, 40, 45) normalization matrix,
// and the subtraction gives the refinement input
//   R = W - ((W' * N + 32) >> 6).
// R goes to the shared quantizer (quant8) with the enhancement QP. Eight
// lanes per cycle, each with its own position; registered, one cycle.
//
// Normalization followed by subtraction, and the normalization matrices,
// follow the encoder's quality-enhancement unit; the +32 rounding and the
// 16-bit saturation are this design's own choices.
module qe_norm_sub
  import svc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic       is8,
  input  coef_t      in_w [8],     // forward-transform coefficients
  input  coef_t      in_s [8],     // accumulated scaled coefficients
  input  logic [2:0] in_i [8],
  input  logic [2:0] in_j [8],
  output logic       out_valid,
  output coef_t      out_r [8]
);
  coef_t r [8];
  always_comb begin
    logic [6:0] n;
    logic signed [31:0] t;
    for (int k = 0; k < 8; k++) begin
      n = is8 ? NRM8[pos_class8(in_i[k], in_j[k])]
              : NRM4[pos_class4(in_i[k][1:0], in_j[k][1:0])];
      t = 32'(in_w[k]) - ((32'(in_s[k]) * $signed(32'(n)) + 32'sd32) >>> 6);
      if (t > 32'sd32767)       r[k] = 16'sh7FFF;
      else if (t < -32'sd32768) r[k] = 16'sh8000;
      else                      r[k] = coef_t'(t);
    end
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int k = 0; k < 8; k++) out_r[k] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) out_r <= r;
    end
  end
endmodule
