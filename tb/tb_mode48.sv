// tb_mode48: TraDED mode decision for 4x4 blocks (thresholds 16 / 2) and 8x8 blocks (thresholds 64 / 2). Random intensity sets,
// biased so that DC-dominant, DC-off, vertical, horizontal and diagonal
// cases all occur, with random neighbour availability and most probable
// mode; the enable word is compared with a model written from the decision
// rules, one cycle after the input. Counts of each case are checked to be
// non-zero.
//
// The expected values come from tb_ref_pkg, written from the standard's
// equations and not from the RTL. The stimulus mix, counts and watchdog
// limit are this testbench's own choices.
module tb_mode48;
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
  intens_t    in_it;
  logic [3:0] mpm;
  logic [8:0] out_en;
  mode48 dut (.*);

  int n_dom = 0, n_off = 0, n_mpm = 0, n_edge = 0, n_big = 0;

  function automatic bit [8:0] big_ref(input rit_t r, input bit chroma, input bit t, input bit l);
    bit [8:0] m;
    bit vmax, hmax;
    m = '0;
    vmax = r.v >= r.h && r.v >= r.d;
    hmax = !vmax && r.h >= r.d;
    if (chroma) begin
      m[0] = 1'b1;
      if (vmax) m[2] = t; else if (hmax) m[1] = l; else m[3] = t && l;
    end else begin
      m[2] = !(t && l) || !(r.dc < 2 * r.ac);
      if (vmax) m[0] = t; else if (hmax) m[1] = l; else m[3] = t && l;
    end
    return m;
  endfunction

  initial begin
    rit_t r;
    bit [8:0] e;
    int kind, sc;
    in_valid = 1'b0;
    in_blk   = BLK_4X4;
    in_it    = '0;
    top_ok   = 1'b0;
    left_ok  = 1'b0;
    mpm      = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 4000; n++) begin
      kind = $urandom_range(0, 2);
      sc   = $urandom_range(0, 5);
      r.v  = $urandom_range(0, 400);
      r.h  = $urandom_range(0, 400);
      r.d  = $urandom_range(0, 400);
      r.dv = $urandom_range(0, 400);
      r.dh = $urandom_range(0, 400);
      if (sc == 0) r.v = r.v * 4;
      if (sc == 1) r.h = r.h * 4;
      r.ac = r.v + r.h + r.d + r.dv + r.dh;
      case ($urandom_range(0, 3))
        0: r.dc = r.ac * int'($urandom_range(10, 100)) + int'($urandom_range(0, 3));
        1: r.dc = $urandom_range(0, r.ac);
        2: r.dc = r.ac * 2 + int'($urandom_range(0, 2)) - 1;
        default: r.dc = $urandom_range(0, 100000);
      endcase
      r.satd = r.dc + r.ac;
      @(negedge clk);
      in_valid = 1'b1;
      top_ok   = ($urandom_range(0, 3) != 0);
      left_ok  = ($urandom_range(0, 3) != 0);
      mpm      = 4'($urandom_range(0, 8));
      in_it.dc = cost_t'(r.dc); in_it.v = cost_t'(r.v); in_it.h = cost_t'(r.h);
      in_it.d = cost_t'(r.d); in_it.dv = cost_t'(r.dv); in_it.dh = cost_t'(r.dh);
      in_it.ac = cost_t'(r.ac); in_it.satd = cost_t'(r.satd);
      in_blk = (kind == 0) ? BLK_4X4 : BLK_8X8;
      e = (kind == 0) ? rdecide(r, 16, 2, int'(mpm), top_ok, left_ok)
                      : rdecide(r, 64, 2, int'(mpm), top_ok, left_ok);
      if (kind != 0) n_big++;
      if (kind == 0 || in_blk == BLK_8X8) begin
        if (r.dc > (in_blk == BLK_8X8 ? 64 : 16) * r.ac) n_dom++;
        if (top_ok && left_ok && r.dc < 2 * r.ac && !e[2]) n_off++;
        if (!(top_ok && left_ok)) n_edge++;
        if (e[mpm] && mpm != 2) n_mpm++;
      end
      @(negedge clk);
      in_valid = 1'b0;
      check(out_valid, "latency");
      check(out_en == e, $sformatf("blk %0d dc %0d ac %0d v %0d h %0d d %0d dv %0d dh %0d t%0d l%0d mpm %0d: got %b exp %b",
                                   in_blk, r.dc, r.ac, r.v, r.h, r.d, r.dv, r.dh, top_ok, left_ok, mpm, out_en, e));
    end
    check(n_dom > 0 && n_off > 0 && n_mpm > 0 && n_edge > 0 && n_big > 0, "all cases exercised");
    $display("cases: DC-dominant %0d, DC off %0d, MPM %0d, boundary %0d, other size %0d",
             n_dom, n_off, n_mpm, n_edge, n_big);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
