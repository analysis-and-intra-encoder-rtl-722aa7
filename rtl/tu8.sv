// tu8: one 1-D 8-point forward transform unit (helper of tran48).
//
// In 8-point mode it computes the H.264 8x8 forward integer transform of
// x[0..7] with the usual even/odd butterfly (sums and differences of
// mirrored samples, then the odd part with the 3/2 and 1/4 weights built
// from shifts). In 4-point mode multiplexers reuse the first butterfly
// stage to compute two independent 4-point core transforms, of x[0..3]
// into y[0..3] and of x[4..7] into y[4..7]. Combinational, 20-bit signed.
//
// Using the 8-point unit for 4x4 transforms too follows the encoder's
// combined 4x4/8x8 transform module; the multiplexing details and the
// 20-bit width are this design's own choices.
module tu8 (
  input  logic               two4,    // 1: two 4-point transforms
  input  logic signed [19:0] x [8],
  output logic signed [19:0] y [8]
);
  logic signed [19:0] a [8];
  logic signed [19:0] b [8];
  logic signed [19:0] s03 [2], d03 [2], s12 [2], d12 [2];
  always_comb begin
    // 8-point path
    a[0] = x[0] + x[7];  a[1] = x[1] + x[6];
    a[2] = x[2] + x[5];  a[3] = x[3] + x[4];
    a[4] = x[0] - x[7];  a[5] = x[1] - x[6];
    a[6] = x[2] - x[5];  a[7] = x[3] - x[4];
    b[0] = a[0] + a[3];  b[1] = a[1] + a[2];
    b[2] = a[0] - a[3];  b[3] = a[1] - a[2];
    b[4] = a[5] + a[6] + ((a[4] >>> 1) + a[4]);
    b[5] = a[4] - a[7] - ((a[6] >>> 1) + a[6]);
    b[6] = a[4] + a[7] - ((a[5] >>> 1) + a[5]);
    b[7] = a[5] - a[6] + ((a[7] >>> 1) + a[7]);
    // 4-point path, two halves
    for (int k = 0; k < 2; k++) begin
      s03[k] = x[4*k+0] + x[4*k+3];
      d03[k] = x[4*k+0] - x[4*k+3];
      s12[k] = x[4*k+1] + x[4*k+2];
      d12[k] = x[4*k+1] - x[4*k+2];
    end
    if (two4) begin
      for (int k = 0; k < 2; k++) begin
        y[4*k+0] = s03[k] + s12[k];
        y[4*k+1] = (d03[k] <<< 1) + d12[k];
        y[4*k+2] = s03[k] - s12[k];
        y[4*k+3] = d03[k] - (d12[k] <<< 1);
      end
    end else begin
      y[0] = b[0] + b[1];
      y[1] = b[4] + (b[7] >>> 2);
      y[2] = b[2] + (b[3] >>> 1);
      y[3] = b[5] + (b[6] >>> 2);
      y[4] = b[0] - b[1];
      y[5] = b[6] - (b[5] >>> 2);
      y[6] = (b[2] >>> 1) - b[3];
      y[7] = (b[4] >>> 2) - b[7];
    end
  end
endmodule
