// tb_costcal416c: random 4x4, 16x16 and chroma coefficient blocks; every
// intensity field and the SATD are compared with an independent sum of
// absolute values over the categories, one cycle after the input.
//
// The expected values come from tb_ref_pkg, written from the standard's
// equations and not from the RTL. The stimulus mix, counts and watchdog
// limit are this testbench's own choices.
module tb_costcal416c;
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

  logic    in_valid, out_valid;
  blk_e    in_blk;
  coef_t   in_c [16];
  intens_t out_it;
  costcal416c dut (.*);

  initial begin
    mat8_t t;
    rit_t  r, rb, rr;
    in_valid = 1'b0;
    in_blk   = BLK_4X4;
    in_c     = '{default: '0};
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 900; n++) begin
      int kind;
      kind = n % 3;
      t = '{default: 0};
      for (int k = 0; k < 16; k++) t[k/4][k%4] = int'($urandom_range(0, 16000)) - 8000;
      @(negedge clk);
      in_valid = 1'b1;
      in_blk   = (kind == 0) ? BLK_4X4 : (kind == 1) ? BLK_16X16 : BLK_CHROMA;
      for (int k = 0; k < 16; k++) in_c[k] = coef_t'(t[k/4][k%4]);
      if (kind == 2) begin
        // Cb at 0,1,4,5 and Cr at 2,3,6,7: DC, V (row 0), H (column 0), D
        r = '{default: 0};
        r.dc = iabs(t[0][0]) + iabs(t[0][2]);
        r.v  = iabs(t[0][1]) + iabs(t[0][3]);
        r.h  = iabs(t[1][0]) + iabs(t[1][2]);
        r.d  = iabs(t[1][1]) + iabs(t[1][3]);
        r.ac = r.v + r.h + r.d;
        r.satd = r.dc + r.ac;
      end else begin
        r = rintens(t, 4);
        if (kind == 1) begin r.dv = 0; r.dh = 0; end
      end
      @(negedge clk);
      in_valid = 1'b0;
      check(out_valid, "latency");
      check(int'(out_it.dc) == r.dc && int'(out_it.v) == r.v && int'(out_it.h) == r.h &&
            int'(out_it.d) == r.d && int'(out_it.dv) == r.dv && int'(out_it.dh) == r.dh,
            $sformatf("kind %0d intensities", kind));
      check(int'(out_it.ac) == r.ac, $sformatf("kind %0d ac %0d exp %0d", kind, out_it.ac, r.ac));
      check(int'(out_it.satd) == r.satd, $sformatf("kind %0d satd", kind));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
