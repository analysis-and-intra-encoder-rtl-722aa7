// tb_pg4816: loads random neighbours with random availability (top, left,
// corner, top-right) and requests all four row pairs of every 8x8 mode the
// availability allows (DC from the filtered samples, 128 with none); results are compared with the filtered-reference
// equations of the standard one cycle after each request. 4x4 (raw edges)
// and 16x16 vertical / horizontal requests are checked as well.
//
// The expected values come from tb_ref_pkg, written from the standard's
// equations and not from the RTL. The stimulus mix, counts and watchdog
// limit are this testbench's own choices.
module tb_pg4816;
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
  logic       ref_load, top_ok, left_ok, corner_ok, tr_ok, in_valid, out_valid;
  blk_e       in_blk;
  logic [3:0] in_mode;
  logic [1:0] in_row;
  pix_t       top [16], left [8], corner, out_p [16];
  pg4816 dut (.*);
  initial begin
    int tt [16], lt [8], t [17], l [9], t4 [17], l4 [9], e;
    int nmodes = 0;
    ref_load = 1'b0; in_valid = 1'b0; in_blk = BLK_8X8; in_mode = '0; in_row = '0;
    top_ok = 1'b0; left_ok = 1'b0; corner_ok = 1'b0; tr_ok = 1'b0;
    top = '{default: '0}; left = '{default: '0}; corner = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      ref_load  = 1'b1;
      top_ok    = ($urandom_range(0, 3) != 0);
      left_ok   = ($urandom_range(0, 3) != 0);
      corner_ok = top_ok && left_ok ? 1'b1 : ($urandom_range(0, 1) == 1);
      tr_ok     = top_ok && ($urandom_range(0, 1) == 1);
      for (int k = 0; k < 16; k++) top[k] = pix_t'($urandom_range(0, 255));
      for (int k = 0; k < 8; k++) left[k] = pix_t'($urandom_range(0, 255));
      corner = pix_t'($urandom_range(0, 255));
      for (int k = 0; k < 16; k++) tt[k] = (tr_ok || k < 8) ? int'(top[k]) : int'(top[7]);
      for (int k = 0; k < 8; k++) lt[k] = left[k];
      rfilt8(tt, lt, int'(corner), top_ok, left_ok, corner_ok, t, l);
      t4 = '{default: 0};
      l4 = '{default: 0};
      t4[0] = corner; l4[0] = corner;
      for (int k = 0; k < 8; k++) t4[k+1] = top[k];
      for (int k = 0; k < 4; k++) l4[k+1] = left[k];
      @(negedge clk);
      ref_load = 1'b0;
      for (int m = 0; m < 9; m++) begin
        bit ok;
        ok = (m == 0 || m == 3 || m == 7) ? top_ok :
             (m == 1 || m == 8) ? left_ok : (m == 2) ? 1'b1 : (top_ok && left_ok && corner_ok);
        if (!ok) continue;
        nmodes++;
        for (int r = 0; r < 4; r++) begin
          in_valid = 1'b1;
          in_blk   = BLK_8X8;
          in_mode  = 4'(m);
          in_row   = 2'(r);
          @(negedge clk);
          check(out_valid, "latency");
          for (int k = 0; k < 16; k++) begin
            if (m == 2) begin
              int st, sl;
              st = 0;
              sl = 0;
              for (int z = 0; z < 8; z++) begin st += t[z+1]; sl += l[z+1]; end
              e = (top_ok && left_ok) ? (st + sl + 8) >> 4 : top_ok ? (st + 4) >> 3 :
                  left_ok ? (sl + 4) >> 3 : 128;
            end else e = rpred(8, m, k % 8, 2 * r + k / 8, t, l);
            check(int'(out_p[k]) == e, $sformatf("8x8 mode %0d t%0d l%0d c%0d tr%0d row %0d px %0d got %0d exp %0d",
                                                 m, top_ok, left_ok, corner_ok, tr_ok, 2*r + k/8, k%8, out_p[k], e));
          end
        end
      end
      if (top_ok && left_ok && corner_ok) begin
        // 4x4 request on the raw edges (top-right present)
        in_valid = 1'b1;
        in_blk   = BLK_4X4;
        in_mode  = 4'($urandom_range(3, 8));
        @(negedge clk);
        for (int k = 0; k < 16; k++) begin
          e = rpred(4, int'(in_mode), k % 4, k / 4, t4, l4);
          check(int'(out_p[k]) == e, $sformatf("4x4 mode %0d px %0d got %0d exp %0d", in_mode, k, out_p[k], e));
        end
        in_valid = 1'b1;
        in_blk   = BLK_16X16;
        in_mode  = 4'($urandom_range(0, 1));
        @(negedge clk);
        for (int k = 0; k < 16; k++)
          check(int'(out_p[k]) == (in_mode == 1 ? int'(left[k/4]) : int'(top[k%4])), "16x16 V/H");
      end
      in_valid = 1'b0;
    end
    check(nmodes > 1000, "enough mode requests");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
