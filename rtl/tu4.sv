// tu4: one 1-D 4-point forward transform unit (helper of tran4dc).
//
// A butterfly shared by the H.264 4x4 integer core transform and the 4x4
// Hadamard transform: both start from the sums and differences x0+-x3 and
// x1+-x2; a multiplexer on the odd outputs selects the weights (2,1)/(1,-2)
// of the core transform or (1,1)/(1,-1) of the Hadamard transform.
// Purely combinational, 18-bit signed samples in and out.
//
// Sharing one butterfly between the DCT and the Hadamard transform follows
// the encoder's transform unit design; the 18-bit width is this design's
// own choice.
module tu4 (
  input  logic               dht,     // 0: core DCT, 1: Hadamard
  input  logic signed [17:0] x [4],
  output logic signed [17:0] y [4]
);
  logic signed [17:0] s03, d03, s12, d12;
  always_comb begin
    s03 = x[0] + x[3];
    d03 = x[0] - x[3];
    s12 = x[1] + x[2];
    d12 = x[1] - x[2];
    y[0] = s03 + s12;
    y[2] = s03 - s12;
    if (dht) begin
      y[1] = d03 + d12;
      y[3] = d03 - d12;
    end else begin
      y[1] = (d03 <<< 1) + d12;
      y[3] = d03 - (d12 <<< 1);
    end
  end
endmodule
