// tb_recon8: random predictions and residuals, including residuals that
// push the sum below 0 and above 255; each lane must be the clipped sum one
// cycle later. Counts the clipping cases and fails if none occurred.
//
// The expected values come from tb_ref_pkg, written from the standard's
// equations and not from the RTL. The stimulus mix, counts and watchdog
// limit are this testbench's own choices.
module tb_recon8;
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
  logic  in_valid, out_valid;
  pix_t  prd [8], rec [8];
  coef_t res [8];
  recon8 dut (.*);
  initial begin
    int lo = 0, hi = 0, s;
    in_valid = 1'b0;
    prd = '{default: '0};
    res = '{default: '0};
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      in_valid = 1'b1;
      for (int k = 0; k < 8; k++) begin
        prd[k] = pix_t'($urandom_range(0, 255));
        res[k] = (n % 5 == 0) ? coef_t'(int'($urandom_range(0, 20000)) - 10000)
                              : coef_t'(int'($urandom_range(0, 600)) - 300);
      end
      @(negedge clk);
      in_valid = 1'b0;
      check(out_valid, "latency");
      for (int k = 0; k < 8; k++) begin
        s = int'(prd[k]) + int'(res[k]);
        if (s < 0) lo++;
        if (s > 255) hi++;
        check(int'(rec[k]) == clip255(s), $sformatf("lane %0d", k));
      end
    end
    check(lo > 0 && hi > 0, "both clipping directions exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
