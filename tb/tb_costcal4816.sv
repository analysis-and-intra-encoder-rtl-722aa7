// tb_costcal4816: random 4x4 and 16x16 blocks (one beat) and 8x8 blocks
// (four beats of column pairs, in the order the forward transform delivers
// them), back to back; checks every intensity and the SATD against the
// independent model and that an 8x8 result appears one cycle after beat 3.
//
// The expected values come from tb_ref_pkg, written from the standard's
// equations and not from the RTL. The stimulus mix, counts and watchdog
// limit are this testbench's own choices.
module tb_costcal4816;
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

  logic       in_valid, out_valid;
  blk_e       in_blk;
  logic [1:0] in_beat;
  coef_t      in_c [16];
  intens_t    out_it;
  costcal4816 dut (.*);

  rit_t q [$];
  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      rit_t r;
      if (q.size() == 0) check(1'b0, "unexpected output");
      else begin
        r = q.pop_front();
        check(int'(out_it.dc) == r.dc && int'(out_it.v) == r.v && int'(out_it.h) == r.h &&
              int'(out_it.d) == r.d && int'(out_it.dv) == r.dv && int'(out_it.dh) == r.dh,
              $sformatf("intensities dc %0d/%0d v %0d/%0d h %0d/%0d d %0d/%0d dv %0d/%0d dh %0d/%0d", out_it.dc, r.dc, out_it.v, r.v, out_it.h, r.h, out_it.d, r.d, out_it.dv, r.dv, out_it.dh, r.dh));
        check(int'(out_it.ac) == r.ac && int'(out_it.satd) == r.satd,
              $sformatf("ac %0d/%0d satd %0d/%0d", out_it.ac, r.ac, out_it.satd, r.satd));
      end
    end
  end

  initial begin
    mat8_t t;
    rit_t  r;
    in_valid = 1'b0;
    in_blk   = BLK_4X4;
    in_beat  = '0;
    in_c     = '{default: '0};
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 600; n++) begin
      int kind;
      kind = $urandom_range(0, 2);
      t = '{default: 0};
      for (int i = 0; i < 8; i++)
        for (int j = 0; j < 8; j++) t[i][j] = int'($urandom_range(0, 8000)) - 4000;
      if (kind == 2) begin
        r = rintens(t, 8);
        q.push_back(r);
        for (int b = 0; b < 4; b++) begin
          @(negedge clk);
          in_valid = 1'b1;
          in_blk   = BLK_8X8;
          in_beat  = 2'(b);
          for (int k = 0; k < 16; k++) in_c[k] = coef_t'(t[k%8][2*b + k/8]);
        end
        @(negedge clk);
        in_valid = 1'b0;
        check(out_valid, "8x8 result one cycle after beat 3");
      end else begin
        r = rintens(t, 4);
        if (kind == 1) begin r.dv = 0; r.dh = 0; end
        q.push_back(r);
        @(negedge clk);
        in_valid = 1'b1;
        in_blk   = (kind == 0) ? BLK_4X4 : BLK_16X16;
        in_beat  = '0;
        for (int k = 0; k < 16; k++) in_c[k] = coef_t'(t[k/4][k%4]);
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (4) @(negedge clk);
    check(q.size() == 0, "all results seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
