// tran4dc: 4x4 forward transform unit for DCT and Hadamard (DHT) work.
//
// A whole 4x4 block enters per cycle (16 samples, row-major, index 4*i+j
// with i the row) and its transform leaves one cycle later, so the unit
// sustains 16 samples per cycle. Four tu4 units transform the rows and four
// more the columns of the row results (eight 1-D units, as in the design).
// Modes (tmode_e):
//   TR_DCT  - H.264 4x4 integer core transform (no scaling);
//   TR_DHT  - 4x4 Hadamard of the sixteen luma DC terms, result >>1
//             (arithmetic shift, as the reference encoder does);
//   TR_DHT2 - 2x2 Hadamard of the chroma DC terms held at indices
//             0,1,4,5; the other outputs are zero.
// Output is registered: out_valid follows in_valid by one cycle. Results
// are 16-bit two's complement; for 8-bit residuals and DC terms of 4x4
// residual blocks no result overflows.
module tran4dc
  import svc_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  tmode_e in_mode,
  input  coef_t  in_x [16],
  output logic   out_valid,
  output coef_t  out_y [16]
);
  logic signed [17:0] rin  [4][4];
  logic signed [17:0] rout [4][4];
  logic signed [17:0] cin  [4][4];
  logic signed [17:0] cout [4][4];
  logic               dht;
  coef_t              res [16];

  assign dht = (in_mode != TR_DCT);

  for (genvar r = 0; r < 4; r++) begin : g_row
    for (genvar k = 0; k < 4; k++) begin : g_in
      assign rin[r][k] = 18'(in_x[4*r+k]);
    end
    tu4 u_h (.dht(dht), .x(rin[r]), .y(rout[r]));
  end
  for (genvar c = 0; c < 4; c++) begin : g_col
    for (genvar k = 0; k < 4; k++) begin : g_in
      assign cin[c][k] = rout[k][c];
    end
    tu4 u_v (.dht(dht), .x(cin[c]), .y(cout[c]));
  end

  always_comb begin
    for (int i = 0; i < 16; i++) res[i] = '0;
    case (in_mode)
      TR_DCT:  for (int i = 0; i < 4; i++)
                 for (int j = 0; j < 4; j++) res[4*i+j] = coef_t'(cout[j][i]);
      TR_DHT:  for (int i = 0; i < 4; i++)
                 for (int j = 0; j < 4; j++) res[4*i+j] = coef_t'(cout[j][i] >>> 1);
      default: begin
        res[0] = in_x[0] + in_x[1] + in_x[4] + in_x[5];
        res[1] = in_x[0] - in_x[1] + in_x[4] - in_x[5];
        res[4] = in_x[0] + in_x[1] - in_x[4] - in_x[5];
        res[5] = in_x[0] - in_x[1] - in_x[4] + in_x[5];
      end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int i = 0; i < 16; i++) out_y[i] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) out_y <= res;
    end
  end
endmodule
