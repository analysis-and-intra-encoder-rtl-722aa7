// tb_pg_pls: random 16x16 and chroma neighbours; the plane parameters a, b
// and c are compared with the standard's gradient sums one cycle later.
//
// The expected values come from tb_ref_pkg, written from the standard's
// equations and not from the RTL. The stimulus mix, counts and watchdog
// limit are this testbench's own choices.
module tb_pg_pls;
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
  logic               in_valid, out_valid, is_chroma;
  pix_t               top [16], left [16], corner;
  logic signed [15:0] out_a, out_b, out_c;
  pg_pls dut (.*);

  function automatic int tp(input int k);
    return k < 0 ? int'(corner) : int'(top[k]);
  endfunction
  function automatic int lp(input int k);
    return k < 0 ? int'(corner) : int'(left[k]);
  endfunction

  initial begin
    int h, v, a, b, c, n;
    in_valid = 1'b0; is_chroma = 1'b0;
    top = '{default: '0}; left = '{default: '0}; corner = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int it = 0; it < 3000; it++) begin
      @(negedge clk);
      in_valid  = 1'b1;
      is_chroma = $urandom_range(0, 1);
      for (int k = 0; k < 16; k++) begin
        top[k]  = pix_t'($urandom_range(0, 255));
        left[k] = pix_t'($urandom_range(0, 255));
      end
      corner = pix_t'($urandom_range(0, 255));
      if (it % 10 == 0) begin
        // extreme gradients
        for (int k = 0; k < 16; k++) begin
          top[k]  = (k < 8) ? 8'd0 : 8'd255;
          left[k] = (k < 8) ? 8'd255 : 8'd0;
        end
      end
      n = is_chroma ? 4 : 8;
      h = 0;
      v = 0;
      for (int x = 0; x < n; x++) begin
        h += (x + 1) * (tp(n + x) - tp(n - 2 - x));
        v += (x + 1) * (lp(n + x) - lp(n - 2 - x));
      end
      a = 16 * (lp(2*n - 1) + tp(2*n - 1));
      b = is_chroma ? (34 * h + 32) >>> 6 : (5 * h + 32) >>> 6;
      c = is_chroma ? (34 * v + 32) >>> 6 : (5 * v + 32) >>> 6;
      @(negedge clk);
      in_valid = 1'b0;
      check(out_valid, "latency");
      check(int'(out_a) == a && int'(out_b) == b && int'(out_c) == c,
            $sformatf("chroma %0d: got %0d %0d %0d exp %0d %0d %0d", is_chroma, out_a, out_b, out_c, a, b, c));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
