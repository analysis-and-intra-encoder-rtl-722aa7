// tb_mode_cand_gen: loads random enable words (including all-zero and
// single-mode words) and consumes the candidate stream with random
// back-pressure; checks that the enabled modes come out in ascending order,
// one per accepted cycle starting the cycle after load, that cand_last
// marks the final one and that done pulses after it (or at once for an
// empty word).
//
// The expected values come from tb_ref_pkg, written from the standard's
// equations and not from the RTL. The stimulus mix, counts and watchdog
// limit are this testbench's own choices.
module tb_mode_cand_gen;
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
  logic       load, cand_ready, cand_valid, cand_last, done;
  logic [8:0] en;
  logic [3:0] cand_mode;
  mode_cand_gen dut (.*);

  initial begin
    bit [8:0] w;
    int exp_modes [$];
    int got, stall_cycles;
    load = 1'b0;
    en = '0;
    cand_ready = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 500; n++) begin
      case (n % 5)
        0: w = '0;
        1: w = 9'(1 << $urandom_range(0, 8));
        default: w = 9'($urandom_range(0, 511));
      endcase
      exp_modes.delete();
      for (int m = 0; m < 9; m++) if (w[m]) exp_modes.push_back(m);
      @(negedge clk);
      load = 1'b1;
      en = w;
      cand_ready = 1'b0;
      @(negedge clk);
      load = 1'b0;
      if (w == 0) begin
        check(!cand_valid, "empty word gives no candidate");
        check(done, "empty word: done at once");
        continue;
      end
      stall_cycles = 0;
      got = 0;
      while (got < exp_modes.size()) begin
        check(cand_valid, "candidate available");
        check(int'(cand_mode) == exp_modes[got],
              $sformatf("word %b candidate %0d got %0d exp %0d", w, got, cand_mode, exp_modes[got]));
        check(cand_last == (got == exp_modes.size() - 1), "cand_last");
        cand_ready = ($urandom_range(0, 2) != 0);
        if (!cand_ready) stall_cycles++;
        if (cand_ready) got++;
        @(negedge clk);
        check(!(got < exp_modes.size()) || !done, "no early done");
      end
      cand_ready = 1'b0;
      check(done, "done after the last candidate");
      check(!cand_valid, "stream empty");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
