// tb_pg416c: random neighbours; every directional 4x4 mode (V, H, DDL,
// DDR, VR, HD, VL, HU) with and without the top-right pixels, plus the
// 16x16 / chroma vertical and horizontal pieces, compared with the
// prediction equations of the standard one cycle after the request.
//
// The expected values come from tb_ref_pkg, written from the standard's
// equations and not from the RTL. The stimulus mix, counts and watchdog
// limit are this testbench's own choices.
module tb_pg416c;
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
  logic       in_valid, out_valid, tr_ok;
  blk_e       in_blk;
  logic [3:0] in_mode;
  pix_t       top [8], left [4], corner, out_p [16];
  pg416c dut (.*);
  initial begin
    int t [17], l [9], e;
    int modes [8] = '{0, 1, 3, 4, 5, 6, 7, 8};
    in_valid = 1'b0; in_blk = BLK_4X4; in_mode = '0; tr_ok = 1'b0;
    top = '{default: '0}; left = '{default: '0}; corner = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      int kind;
      kind = $urandom_range(0, 5);
      @(negedge clk);
      in_valid = 1'b1;
      tr_ok = $urandom_range(0, 1);
      for (int k = 0; k < 8; k++) top[k] = pix_t'($urandom_range(0, 255));
      for (int k = 0; k < 4; k++) left[k] = pix_t'($urandom_range(0, 255));
      corner = pix_t'($urandom_range(0, 255));
      t = '{default: 0};
      l = '{default: 0};
      t[0] = corner; l[0] = corner;
      for (int k = 0; k < 8; k++) t[k+1] = (tr_ok || k < 4) ? int'(top[k]) : int'(top[3]);
      for (int k = 0; k < 4; k++) l[k+1] = left[k];
      if (kind == 0) begin
        in_blk  = ($urandom_range(0, 1) == 1) ? BLK_16X16 : BLK_CHROMA;
        in_mode = $urandom_range(0, 1) ? 4'd1 : ((in_blk == BLK_CHROMA) ? 4'd2 : 4'd0);
      end else begin
        in_blk  = BLK_4X4;
        in_mode = 4'(modes[$urandom_range(0, 7)]);
      end
      @(negedge clk);
      in_valid = 1'b0;
      check(out_valid, "latency");
      for (int k = 0; k < 16; k++) begin
        if (in_blk == BLK_4X4) e = rpred(4, int'(in_mode), k % 4, k / 4, t, l);
        else e = (in_mode == 4'd1) ? int'(left[k/4]) : int'(top[k%4]);
        check(int'(out_p[k]) == e, $sformatf("blk %0d mode %0d tr %0d pixel %0d got %0d exp %0d",
                                             in_blk, in_mode, tr_ok, k, out_p[k], e));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
