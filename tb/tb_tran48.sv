// tb_tran48: checks the shared 4x4 / 8x8 forward transform. Random 4x4
// blocks (one beat, row-major) and 8x8 blocks (four beats of row pairs) are
// streamed back to back, mixed, and every output beat is compared with the
// reference butterflies: 4x4 results row-major two cycles after input, 8x8
// results as four beats of column pairs, the first one two cycles after the
// block's last input beat. A 4x4 block follows an 8x8 block only after
// the 8x8 read-out, as the block requires.
//
// The expected values come from tb_ref_pkg, written from the standard's
// equations and not from the RTL. The stimulus mix, counts and watchdog
// limit are this testbench's own choices.
module tb_tran48;
  import svc_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask
  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic       in_valid, in_is4, out_valid, out_is4;
  logic [1:0] out_beat;
  coef_t      in_x [16], out_y [16];
  tran48 dut (.*);

  typedef struct {
    int  v [16];
    bit  is4;
    int  beat;
    longint due;
  } exp_t;
  exp_t q [$];
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // output monitor
  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      exp_t e;
      if (q.size() == 0) check(1'b0, "unexpected output");
      else begin
        e = q.pop_front();
        check(out_is4 == e.is4 && int'(out_beat) == e.beat, "beat tag");
        if (e.due >= 0) check(cyc == e.due, $sformatf("latency: at %0d expected %0d", cyc, e.due));
        for (int k = 0; k < 16; k++)
          check(int'(out_y[k]) == e.v[k], $sformatf("is4 %0d beat %0d coef %0d got %0d exp %0d",
                                                    e.is4, e.beat, k, out_y[k], e.v[k]));
      end
    end
  end

  initial begin
    mat8_t x, r;
    exp_t e;
    int gap;
    bit last4 = 1'b1;
    in_valid = 1'b0;
    in_is4   = 1'b0;
    in_x     = '{default: '0};
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 400; t++) begin
      bit is4;
      is4 = ($urandom_range(0, 2) == 0);
      x = '{default: 0};
      for (int i = 0; i < 8; i++)
        for (int j = 0; j < 8; j++) x[i][j] = int'($urandom_range(0, 510)) - 255;
      gap = ($urandom_range(0, 3) == 0) ? int'($urandom_range(1, 3)) : 0;
      // a 4x4 block may not enter while an 8x8 block is being read out
      if (is4 && !last4) gap = 6;
      last4 = is4;
      repeat (gap) begin
        @(negedge clk);
        in_valid = 1'b0;
      end
      if (is4) begin
        r = xf4(x, 0);
        @(negedge clk);
        in_valid = 1'b1;
        in_is4   = 1'b1;
        for (int k = 0; k < 16; k++) in_x[k] = coef_t'(x[k/4][k%4]);
        e.is4 = 1'b1; e.beat = 0; e.due = cyc + 2;
        for (int k = 0; k < 16; k++) e.v[k] = r[k/4][k%4];
        q.push_back(e);
      end else begin
        r = xf8(x, 1'b0);
        for (int b = 0; b < 4; b++) begin
          @(negedge clk);
          in_valid = 1'b1;
          in_is4   = 1'b0;
          for (int k = 0; k < 16; k++) in_x[k] = coef_t'(x[2*b + k/8][k%8]);
        end
        for (int b = 0; b < 4; b++) begin
          e.is4 = 1'b0; e.beat = b; e.due = (b == 0) ? cyc + 2 : -1;
          for (int k = 0; k < 16; k++) e.v[k] = r[k%8][2*b + k/8];
          q.push_back(e);
        end
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (12) @(negedge clk);
    check(q.size() == 0, "all outputs seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
