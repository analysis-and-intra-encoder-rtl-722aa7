// tb_tran4dc: checks the 4x4 forward DCT, the 4x4 Hadamard of luma DC
// terms (halved) and the 2x2 chroma DC Hadamard against the reference
// butterflies of tb_ref_pkg, with random inputs, and checks the one-cycle
// latency of every transform.
//
// The expected values come from tb_ref_pkg, written from the standard's
// equations and not from the RTL. The stimulus mix, counts and watchdog
// limit are this testbench's own choices.
module tb_tran4dc;
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
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic   in_valid, out_valid;
  tmode_e in_mode;
  coef_t  in_x [16], out_y [16];
  tran4dc dut (.*);

  initial begin
    mat8_t x, r;
    int m;
    in_valid = 1'b0;
    in_mode  = TR_DCT;
    in_x     = '{default: '0};
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 600; t++) begin
      m = t % 3;
      x = '{default: 0};
      for (int i = 0; i < 4; i++)
        for (int j = 0; j < 4; j++)
          x[i][j] = (m == 0) ? int'($urandom_range(0, 510)) - 255
                             : int'($urandom_range(0, 8160)) - 4080;
      @(negedge clk);
      in_valid = 1'b1;
      in_mode  = tmode_e'(m);
      for (int k = 0; k < 16; k++) in_x[k] = coef_t'(x[k/4][k%4]);
      @(negedge clk);
      in_valid = 1'b0;
      check(out_valid, "one-cycle latency");
      if (m == 2) begin
        r = '{default: 0};
        r[0][0] = x[0][0] + x[0][1] + x[1][0] + x[1][1];
        r[0][1] = x[0][0] - x[0][1] + x[1][0] - x[1][1];
        r[1][0] = x[0][0] + x[0][1] - x[1][0] - x[1][1];
        r[1][1] = x[0][0] - x[0][1] - x[1][0] + x[1][1];
        for (int k = 0; k < 2; k++)
          for (int j = 0; j < 2; j++)
            check(int'(out_y[4*k+j]) == r[k][j], $sformatf("DHT2 %0d %0d", k, j));
      end else begin
        r = xf4(x, m);
        for (int k = 0; k < 16; k++)
          check(int'(out_y[k]) == r[k/4][k%4],
                $sformatf("mode %0d coef %0d got %0d exp %0d", m, k, out_y[k], r[k/4][k%4]));
      end
      @(negedge clk);
      check(!out_valid, "valid is a single pulse");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
