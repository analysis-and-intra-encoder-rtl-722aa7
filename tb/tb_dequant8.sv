// tb_dequant8: random levels, QPs 0..51, 4x4 and 8x8 positions and the
// luma-DC / chroma-DC scalings; results are compared with the reference
// scaling (flat weighting) one cycle after the input, including the 16-bit
// saturation of large products.
//
// The expected values come from tb_ref_pkg, written from the standard's
// equations and not from the RTL. The stimulus mix, counts and watchdog
// limit are this testbench's own choices.
module tb_dequant8;
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
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  logic       in_valid, out_valid, is8;
  logic [1:0] dc_kind;
  logic [5:0] qp;
  coef_t      in_l [8], out_c [8];
  logic [2:0] in_i [8], in_j [8];
  dequant8 dut (.*);
  initial begin
    int e;
    in_valid = 1'b0; is8 = 1'b0; dc_kind = '0; qp = '0;
    in_l = '{default: '0}; in_i = '{default: '0}; in_j = '{default: '0};
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      in_valid = 1'b1;
      is8     = $urandom_range(0, 1);
      dc_kind = is8 ? 2'd0 : 2'($urandom_range(0, 2));
      qp      = 6'($urandom_range(0, 51));
      for (int k = 0; k < 8; k++) begin
        in_l[k] = (n % 4 == 0) ? coef_t'(int'($urandom_range(0, 4000)) - 2000)
                               : coef_t'(int'($urandom_range(0, 40)) - 20);
        in_i[k] = is8 ? 3'($urandom_range(0, 7)) : 3'($urandom_range(0, 3));
        in_j[k] = is8 ? 3'($urandom_range(0, 7)) : 3'($urandom_range(0, 3));
      end
      @(negedge clk);
      in_valid = 1'b0;
      check(out_valid, "latency");
      for (int k = 0; k < 8; k++) begin
        e = dequant(int'(in_l[k]), int'(qp), is8, int'(dc_kind), int'(in_i[k]), int'(in_j[k]));
        check(int'(out_c[k]) == e, $sformatf("l %0d qp %0d is8 %0d dc %0d (%0d,%0d): got %0d exp %0d",
                                             in_l[k], qp, is8, dc_kind, in_i[k], in_j[k], out_c[k], e));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
