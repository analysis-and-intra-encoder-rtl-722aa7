// tb_pg_plane: random plane parameters (in the ranges pg_pls can produce)
// and every 4x4 piece position of 16x16 and chroma blocks; the 16 pixels
// are compared with clip((a + b(x-xc) + c(y-yc) + 16) >> 5) one cycle
// later. Counts clipped pixels and fails if none occurred.
//
// The expected values come from tb_ref_pkg, written from the standard's
// equations and not from the RTL. The stimulus mix, counts and watchdog
// limit are this testbench's own choices.
module tb_pg_plane;
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
  logic               in_valid, out_valid, is_chroma;
  logic signed [15:0] a, b, c;
  logic [1:0]         bx, by;
  pix_t               out_p [16];
  pg_plane dut (.*);
  initial begin
    int e, xc, nclip = 0;
    in_valid = 1'b0; is_chroma = 1'b0; a = '0; b = '0; c = '0; bx = '0; by = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int it = 0; it < 4000; it++) begin
      @(negedge clk);
      in_valid  = 1'b1;
      is_chroma = $urandom_range(0, 1);
      a  = 16'($urandom_range(0, 8160));
      b  = 16'(int'($urandom_range(0, 1600)) - 800);
      c  = 16'(int'($urandom_range(0, 1600)) - 800);
      bx = is_chroma ? 2'($urandom_range(0, 1)) : 2'($urandom_range(0, 3));
      by = is_chroma ? 2'($urandom_range(0, 1)) : 2'($urandom_range(0, 3));
      xc = is_chroma ? 3 : 7;
      @(negedge clk);
      in_valid = 1'b0;
      check(out_valid, "latency");
      for (int k = 0; k < 16; k++) begin
        int s;
        s = (int'(a) + int'(b) * (4 * int'(bx) + k % 4 - xc) + int'(c) * (4 * int'(by) + k / 4 - xc) + 16) >>> 5;
        if (s < 0 || s > 255) nclip++;
        e = clip255(s);
        check(int'(out_p[k]) == e, $sformatf("px %0d got %0d exp %0d", k, out_p[k], e));
      end
    end
    check(nclip > 0, "clipping exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
