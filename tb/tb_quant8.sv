// tb_quant8: random coefficients, QPs 0..51, 4x4 and 8x8 positions and the
// DC (second-level Hadamard) variant; levels and non-zero flags are
// compared with the reference quantizer (flat MF tables, offset 1/3) one
// cycle after the input.
//
// The expected values come from tb_ref_pkg, written from the standard's
// equations and not from the RTL. The stimulus mix, counts and watchdog
// limit are this testbench's own choices.
module tb_quant8;
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
  logic       in_valid, out_valid, is8, is_dc;
  logic [5:0] qp;
  coef_t      in_c [8], out_l [8];
  logic [2:0] in_i [8], in_j [8];
  logic [7:0] out_nz;
  quant8 dut (.*);
  initial begin
    int e, nzc = 0;
    in_valid = 1'b0; is8 = 1'b0; is_dc = 1'b0; qp = '0;
    in_c = '{default: '0}; in_i = '{default: '0}; in_j = '{default: '0};
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      in_valid = 1'b1;
      is8   = $urandom_range(0, 1);
      is_dc = !is8 && ($urandom_range(0, 4) == 0);
      qp    = 6'($urandom_range(0, 51));
      for (int k = 0; k < 8; k++) begin
        in_c[k] = coef_t'(int'($urandom_range(0, 65535)) - 32768);
        if (n % 3 == 0) in_c[k] = coef_t'(int'($urandom_range(0, 400)) - 200);
        in_i[k] = is8 ? 3'($urandom_range(0, 7)) : 3'($urandom_range(0, 3));
        in_j[k] = is8 ? 3'($urandom_range(0, 7)) : 3'($urandom_range(0, 3));
      end
      @(negedge clk);
      in_valid = 1'b0;
      check(out_valid, "latency");
      for (int k = 0; k < 8; k++) begin
        e = quant(int'(in_c[k]), int'(qp), is8, is_dc, int'(in_i[k]), int'(in_j[k]));
        check(int'(out_l[k]) == e, $sformatf("c %0d qp %0d is8 %0d dc %0d (%0d,%0d): got %0d exp %0d",
                                             in_c[k], qp, is8, is_dc, in_i[k], in_j[k], out_l[k], e));
        check(out_nz[k] == (e != 0), "nz flag");
        if (e != 0) nzc++;
      end
    end
    check(nzc > 0, "non-zero levels produced");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
