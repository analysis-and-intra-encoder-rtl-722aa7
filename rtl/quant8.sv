// quant8: forward quantization of eight coefficients per cycle.
//
// level = sign(W) * ((|W| * MF + f) >> qbits) with MF the QP%6- and
// position-dependent factor looked up in the 4x4 or 8x8 table (svc_pkg),
// qbits = 15 + QP/6 for 4x4 blocks and 16 + QP/6 for 8x8 blocks, and the
// intra rounding offset f = 2^qbits / 3. DC terms that went through a
// second-level Hadamard (luma 16x16 DC or chroma DC, is_dc = 1) use the
// (0,0) factor, one more shift and a doubled offset. Each lane carries its
// own coefficient position (row i, column j). The 8-lane width follows the
// design's choice of 8-pixel parallelism for the QQ-Rec hardware.
// Registered, one cycle latency; out_nz flags lanes with a non-zero level.
module quant8
  import svc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic       is8,
  input  logic       is_dc,
  input  logic [5:0] qp,
  input  coef_t      in_c [8],
  input  logic [2:0] in_i [8],
  input  logic [2:0] in_j [8],
  output logic       out_valid,
  output coef_t      out_l [8],
  output logic [7:0] out_nz
);
  coef_t      lv [8];
  logic [3:0] qdiv;
  logic [2:0] qmod;

  always_comb begin
    logic [5:0]  qbits;
    logic [14:0] mf;
    logic [47:0] mag, f, q;
    qdiv  = qp_div6(qp);
    qmod  = qp_mod6(qp);
    qbits = (is8 ? 6'd16 : 6'd15) + 6'(qdiv) + (is_dc ? 6'd1 : 6'd0);
    f     = (48'd1 << qbits) / 48'd3;
    for (int k = 0; k < 8; k++) begin
      if (is_dc)    mf = 15'(QF4[qmod][0]);
      else if (is8) mf = QF8[qmod][pos_class8(in_i[k], in_j[k])];
      else          mf = 15'(QF4[qmod][pos_class4(in_i[k][1:0], in_j[k][1:0])]);
      mag = (in_c[k] < 0) ? 48'(-32'(in_c[k])) : 48'(in_c[k]);
      q   = (mag * 48'(mf) + f) >> qbits;
      if (q > 48'd32767) q = 48'd32767;
      lv[k] = (in_c[k] < 0) ? -coef_t'(q) : coef_t'(q);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_nz    <= '0;
      for (int k = 0; k < 8; k++) out_l[k] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_l <= lv;
        for (int k = 0; k < 8; k++) out_nz[k] <= (lv[k] != 0);
      end
    end
  end
endmodule
