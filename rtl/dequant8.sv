// dequant8: inverse quantization of eight levels per cycle.
//
// V is the QP%6- and position-dependent factor from the 4x4 or 8x8 inverse
// table (svc_pkg). With d = QP/6:
//   4x4 (dc_kind 0, is8 0): W' = level * V << d
//   8x8 (is8 1)           : W' = (level * 16V << d + 32) >> 6
//   luma 16x16 DC (1)     : W' = (level * 16V00 << d + 32) >> 6
//   chroma DC (2)         : W' = (level * 16V00 << d) >> 5
// which is H.264 scaling with flat weighting matrices. Results saturate to
// 16 bits. Registered, one cycle latency.
//
// The scaling follows the standard with flat weighting; the 8-lane width
// follows the encoder's quantization units; 16-bit saturation is this
// design's own choice.
module dequant8
  import svc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic       is8,
  input  logic [1:0] dc_kind,
  input  logic [5:0] qp,
  input  coef_t      in_l [8],
  input  logic [2:0] in_i [8],
  input  logic [2:0] in_j [8],
  output logic       out_valid,
  output coef_t      out_c [8]
);
  coef_t r [8];
  always_comb begin
    logic [3:0] qdiv;
    logic [2:0] qmod;
    logic [5:0] v;
    logic signed [47:0] t;
    qdiv = qp_div6(qp);
    qmod = qp_mod6(qp);
    for (int k = 0; k < 8; k++) begin
      if (dc_kind != 2'd0) v = DQ4[qmod][0];
      else if (is8)        v = DQ8[qmod][pos_class8(in_i[k], in_j[k])];
      else                 v = DQ4[qmod][pos_class4(in_i[k][1:0], in_j[k][1:0])];
      if (dc_kind == 2'd2)
        t = ((48'(in_l[k]) * $signed(48'(v)) * 48'sd16) <<< qdiv) >>> 5;
      else if (dc_kind == 2'd1 || is8)
        t = (((48'(in_l[k]) * $signed(48'(v)) * 48'sd16) <<< qdiv) + 48'sd32) >>> 6;
      else
        t = (48'(in_l[k]) * $signed(48'(v))) <<< qdiv;
      if (t > 48'sd32767)       r[k] = 16'sh7FFF;
      else if (t < -48'sd32768) r[k] = 16'sh8000;
      else                      r[k] = coef_t'(t);
    end
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int k = 0; k < 8; k++) out_c[k] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) out_c <= r;
    end
  end
endmodule
