// tb_resid_gen: random original and predicted pixels; the 16 residuals
// must equal original minus prediction one cycle later.
//
// The expected values come from tb_ref_pkg, written from the standard's
// equations and not from the RTL. The stimulus mix, counts and watchdog
// limit are this testbench's own choices.
module tb_resid_gen;
  import svc_pkg::*;
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
  logic  in_valid, out_valid;
  pix_t  org [16], prd [16];
  coef_t res [16];
  resid_gen dut (.*);
  initial begin
    in_valid = 1'b0;
    org = '{default: '0};
    prd = '{default: '0};
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      in_valid = 1'b1;
      for (int k = 0; k < 16; k++) begin
        org[k] = pix_t'($urandom_range(0, 255));
        prd[k] = (n % 7 == 0) ? pix_t'(k * 17) : pix_t'($urandom_range(0, 255));
      end
      @(negedge clk);
      in_valid = 1'b0;
      check(out_valid, "latency");
      for (int k = 0; k < 16; k++)
        check(int'(res[k]) == int'(org[k]) - int'(prd[k]), $sformatf("lane %0d", k));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
