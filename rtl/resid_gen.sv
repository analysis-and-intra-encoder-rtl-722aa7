// resid_gen: residual generator, original minus prediction.
//
// Sixteen lanes (one 4x4 block, or two 8-pixel rows of an 8x8 block) per
// cycle; each residual is the 9-bit signed difference, sign-extended to
// the coefficient type so it can feed the forward transforms directly.
// Registered, one cycle latency.
//
// Interface: in_valid, org[16], prd[16] -> out_valid, res[16]. The 16-lane
// width follows the encoder's prediction throughput; the register stage is
// this design's own choice.
module resid_gen
  import svc_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  pix_t  org [16],
  input  pix_t  prd [16],
  output logic  out_valid,
  output coef_t res [16]
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int i = 0; i < 16; i++) res[i] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid)
        for (int i = 0; i < 16; i++) res[i] <= coef_t'(16'(org[i]) - 16'(prd[i]));
    end
  end
endmodule
