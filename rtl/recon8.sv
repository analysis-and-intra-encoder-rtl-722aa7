// recon8: reconstruction adders, prediction plus decoded residual.
//
// Eight lanes per cycle (the throughput of the inverse transform):
// rec = clip(pred + res) to 0..255. Registered, one cycle latency.
//
// Interface: in_valid, prd[8], res[8] -> out_valid, rec[8]. The 8-lane
// width follows the encoder's reconstruction path; registering the output
// is this design's own choice.
module recon8
  import svc_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  pix_t  prd [8],
  input  coef_t res [8],
  output logic  out_valid,
  output pix_t  rec [8]
);
  pix_t clipped [8];
  always_comb begin
    for (int k = 0; k < 8; k++) begin
      logic signed [17:0] s;
      s = $signed(18'(prd[k])) + 18'(res[k]);
      if (s < 0)             clipped[k] = 8'd0;
      else if (s > 18'sd255) clipped[k] = 8'd255;
      else                   clipped[k] = pix_t'(s);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int k = 0; k < 8; k++) rec[k] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) rec <= clipped;
    end
  end
endmodule
