// tb_qe_norm_sub: random coefficients W and scaled lower-layer values W' at
// random 4x4 / 8x8 positions; R = W - ((W' * N + 32) >> 6) with the
// normalization matrices is checked one cycle later. A second part
// quantizes and dequantizes random coefficients and checks that the
// normalized W' comes back close to W (|R| small relative to the step),
// which is what makes the tables normalization tables.
//
// The expected values come from tb_ref_pkg, written from the standard's
// equations and not from the RTL. The stimulus mix, counts and watchdog
// limit are this testbench's own choices.
module tb_qe_norm_sub;
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
  logic       in_valid, out_valid, is8;
  coef_t      in_w [8], in_s [8], out_r [8];
  logic [2:0] in_i [8], in_j [8];
  qe_norm_sub dut (.*);
  initial begin
    int e;
    in_valid = 1'b0; is8 = 1'b0;
    in_w = '{default: '0}; in_s = '{default: '0};
    in_i = '{default: '0}; in_j = '{default: '0};
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 4000; n++) begin
      bit roundtrip;
      int qpv, lv;
      roundtrip = (n % 2 == 1);
      qpv = $urandom_range(10, 40);
      @(negedge clk);
      in_valid = 1'b1;
      is8 = $urandom_range(0, 1);
      for (int k = 0; k < 8; k++) begin
        in_i[k] = is8 ? 3'($urandom_range(0, 7)) : 3'($urandom_range(0, 3));
        in_j[k] = is8 ? 3'($urandom_range(0, 7)) : 3'($urandom_range(0, 3));
        in_w[k] = coef_t'(int'($urandom_range(0, 8000)) - 4000);
        if (roundtrip) begin
          lv = quant(int'(in_w[k]), qpv, is8, 1'b0, int'(in_i[k]), int'(in_j[k]));
          in_s[k] = coef_t'(dequant(lv, qpv, is8, 0, int'(in_i[k]), int'(in_j[k])));
        end else begin
          in_s[k] = coef_t'(int'($urandom_range(0, 65535)) - 32768);
        end
      end
      @(negedge clk);
      in_valid = 1'b0;
      check(out_valid, "latency");
      for (int k = 0; k < 8; k++) begin
        e = norm_sub(int'(in_w[k]), int'(in_s[k]), is8, int'(in_i[k]), int'(in_j[k]));
        check(int'(out_r[k]) == e, $sformatf("w %0d s %0d is8 %0d (%0d,%0d): got %0d exp %0d",
                                             in_w[k], in_s[k], is8, in_i[k], in_j[k], out_r[k], e));
        // step of QP 40 is at most about 2^(40/6) * 1.6 * 2.5 in W units
        if (roundtrip) check(iabs(e) <= 500, $sformatf("round trip residue %0d", e));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
