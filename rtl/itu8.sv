// itu8: one 1-D inverse transform unit (helper of itran).
//
// kind 0: H.264 8-point inverse integer transform of x[0..7];
// kind 1: two 4-point inverse core transforms, x[0..3] and x[4..7];
// kind 2: two 4-point Hadamard transforms, x[0..3] and x[4..7].
// The 4-point paths reuse the even part of the 8-point butterfly.
// Combinational, 20-bit signed.
//
// The transform equations are the standard's inverse butterflies; sharing
// one unit among the four kinds follows the encoder's inverse-transform
// module, and the 20-bit width is this design's own choice.
module itu8 (
  input  logic [1:0]         kind,
  input  logic signed [19:0] x [8],
  output logic signed [19:0] y [8]
);
  logic signed [19:0] a [8];
  logic signed [19:0] b [8];
  logic signed [19:0] e [2][4];
  always_comb begin
    // 8-point
    a[0] = x[0] + x[4];
    a[4] = x[0] - x[4];
    a[2] = (x[2] >>> 1) - x[6];
    a[6] = x[2] + (x[6] >>> 1);
    b[0] = a[0] + a[6];
    b[2] = a[4] + a[2];
    b[4] = a[4] - a[2];
    b[6] = a[0] - a[6];
    a[1] = -x[3] + x[5] - x[7] - (x[7] >>> 1);
    a[3] =  x[1] + x[7] - x[3] - (x[3] >>> 1);
    a[5] = -x[1] + x[7] + x[5] + (x[5] >>> 1);
    a[7] =  x[3] + x[5] + x[1] + (x[1] >>> 1);
    b[1] = a[1] + (a[7] >>> 2);
    b[7] = a[7] - (a[1] >>> 2);
    b[3] = a[3] + (a[5] >>> 2);
    b[5] = (a[3] >>> 2) - a[5];
    // 4-point halves
    for (int k = 0; k < 2; k++) begin
      if (kind == 2'd2) begin
        e[k][0] = x[4*k+0] + x[4*k+1];
        e[k][1] = x[4*k+0] - x[4*k+1];
        e[k][2] = x[4*k+2] + x[4*k+3];
        e[k][3] = x[4*k+2] - x[4*k+3];
      end else begin
        e[k][0] = x[4*k+0] + x[4*k+2];
        e[k][1] = x[4*k+0] - x[4*k+2];
        e[k][2] = (x[4*k+1] >>> 1) - x[4*k+3];
        e[k][3] = x[4*k+1] + (x[4*k+3] >>> 1);
      end
    end
    case (kind)
      2'd0: begin
        y[0] = b[0] + b[7];  y[1] = b[2] + b[5];
        y[2] = b[4] + b[3];  y[3] = b[6] + b[1];
        y[4] = b[6] - b[1];  y[5] = b[4] - b[3];
        y[6] = b[2] - b[5];  y[7] = b[0] - b[7];
      end
      2'd2: for (int k = 0; k < 2; k++) begin
        // rows of the Hadamard matrix: ++++, ++--, +--+, +-+-
        y[4*k+0] = e[k][0] + e[k][2];
        y[4*k+1] = e[k][0] - e[k][2];
        y[4*k+2] = e[k][1] - e[k][3];
        y[4*k+3] = e[k][1] + e[k][3];
      end
      default: for (int k = 0; k < 2; k++) begin
        y[4*k+0] = e[k][0] + e[k][3];
        y[4*k+1] = e[k][1] + e[k][2];
        y[4*k+2] = e[k][1] - e[k][2];
        y[4*k+3] = e[k][0] - e[k][3];
      end
    endcase
  end
endmodule
