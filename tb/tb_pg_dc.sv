// tb_pg_dc: random neighbours and availability for 4x4, 8x8, 16x16 and the
// four chroma 4x4 pieces; the DC value is compared with the standard's
// rules (both sides, one side, none = 128; chroma pieces (1,0) / (0,1)
// prefer the top / left side) one cycle after the request.
//
// The expected values come from tb_ref_pkg, written from the standard's
// equations and not from the RTL. The stimulus mix, counts and watchdog
// limit are this testbench's own choices.
module tb_pg_dc;
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
  logic       in_valid, out_valid, top_ok, left_ok;
  blk_e       in_blk;
  logic [1:0] cblk;
  pix_t       top [16], left [16], out_p;
  pg_dc dut (.*);

  function automatic int dcv(input int st, input int sl, input int n, input bit t, input bit l);
    if (t && l) return (st + sl + n) / (2 * n);
    if (t) return (st + n / 2) / n;
    if (l) return (sl + n / 2) / n;
    return 128;
  endfunction

  initial begin
    int e, n, st, sl, x0, y0;
    in_valid = 1'b0; in_blk = BLK_4X4; cblk = '0; top_ok = 1'b0; left_ok = 1'b0;
    top = '{default: '0}; left = '{default: '0};
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int it = 0; it < 4000; it++) begin
      @(negedge clk);
      in_valid = 1'b1;
      in_blk   = blk_e'($urandom_range(0, 3));
      cblk     = 2'($urandom_range(0, 3));
      top_ok   = $urandom_range(0, 1);
      left_ok  = $urandom_range(0, 1);
      for (int k = 0; k < 16; k++) begin
        top[k]  = pix_t'($urandom_range(0, 255));
        left[k] = pix_t'($urandom_range(0, 255));
      end
      n  = (in_blk == BLK_8X8) ? 8 : (in_blk == BLK_16X16) ? 16 : 4;
      x0 = (in_blk == BLK_CHROMA) ? 4 * int'(cblk[0]) : 0;
      y0 = (in_blk == BLK_CHROMA) ? 4 * int'(cblk[1]) : 0;
      st = 0;
      sl = 0;
      for (int k = 0; k < n; k++) begin
        st += int'(top[x0 + k]);
        sl += int'(left[y0 + k]);
      end
      if (in_blk == BLK_CHROMA && cblk == 2'b01)
        e = top_ok ? dcv(st, 0, 4, 1, 0) : dcv(0, sl, 4, 0, left_ok);
      else if (in_blk == BLK_CHROMA && cblk == 2'b10)
        e = left_ok ? dcv(0, sl, 4, 0, 1) : dcv(st, 0, 4, top_ok, 0);
      else
        e = dcv(st, sl, n, top_ok, left_ok);
      @(negedge clk);
      in_valid = 1'b0;
      check(out_valid, "latency");
      check(int'(out_p) == e, $sformatf("blk %0d cblk %0d t%0d l%0d got %0d exp %0d",
                                        in_blk, cblk, top_ok, left_ok, out_p, e));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
