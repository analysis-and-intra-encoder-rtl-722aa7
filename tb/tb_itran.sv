// tb_itran: streams random 4x4, 8x8, 4x4-Hadamard and 2x2-Hadamard blocks
// back to back (random gaps, in_ready honoured) and compares every output
// beat with the reference inverse butterflies: columns out, (x + 32) >> 6
// for the residual transforms, no shift for the Hadamards. Checks the
// cycle of every output beat: the first beat of a block two cycles after
// its last input beat (later only while the previous block is still being
// output), the rest consecutive, and out_last on the final beat.
//
// The expected values come from tb_ref_pkg, written from the standard's
// equations and not from the RTL. The stimulus mix, counts and watchdog
// limit are this testbench's own choices.
module tb_itran;
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
  logic       in_valid, in_ready, out_valid, out_last;
  logic [1:0] in_kind, out_kind;
  logic [2:0] out_beat;
  coef_t      in_c [8], out_r [8];
  itran dut (.*);

  typedef struct {
    int v [8];
    int n;       // lanes compared
    int kind;
    int beat;
    bit last;
    longint due;
  } exp_t;
  exp_t q [$];
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      exp_t e;
      if (q.size() == 0) check(1'b0, "unexpected output");
      else begin
        e = q.pop_front();
        check(int'(out_kind) == e.kind && int'(out_beat) == e.beat && out_last == e.last,
              $sformatf("tags kind %0d/%0d beat %0d/%0d last %0d/%0d", out_kind, e.kind, out_beat, e.beat, out_last, e.last));
        if (e.due >= 0) check(cyc == e.due, $sformatf("latency %0d vs %0d", cyc, e.due));
        for (int k = 0; k < e.n; k++)
          check(int'(out_r[k]) == e.v[k], $sformatf("kind %0d beat %0d lane %0d got %0d exp %0d",
                                                    e.kind, e.beat, k, out_r[k], e.v[k]));
      end
    end
  end

  task automatic send(input coef_t row [8], input int kind);
    @(negedge clk);
    in_valid = 1'b1;
    in_kind  = 2'(kind);
    in_c     = row;
    while (!in_ready) @(negedge clk);
  endtask

  initial begin
    mat8_t x, r;
    exp_t e;
    coef_t row [8];
    int kind, nb, mag;
    longint first, prev_end = 0;
    in_valid = 1'b0; in_kind = '0; in_c = '{default: '0};
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 800; n++) begin
      kind = $urandom_range(0, 3);
      mag  = (n % 4 == 0) ? ((kind == 2) ? 2000 : 8000) : 600;
      x = '{default: 0};
      for (int i = 0; i < 8; i++)
        for (int j = 0; j < 8; j++) x[i][j] = int'($urandom_range(0, 2 * mag)) - mag;
      if ($urandom_range(0, 3) == 0) begin
        @(negedge clk);
        in_valid = 1'b0;
      end
      nb = (kind == 1) ? 8 : (kind == 3) ? 1 : 2;
      for (int b = 0; b < nb; b++) begin
        row = '{default: '0};
        for (int k = 0; k < 8; k++) begin
          if (kind == 1) row[k] = coef_t'(x[b][k]);
          else if (kind == 3) row[k] = (k < 4) ? coef_t'(x[k/2][k%2]) : '0;
          else row[k] = coef_t'(x[2*b + k/4][k%4]);
        end
        send(row, kind);
      end
      case (kind)
        0: r = xf4(x, 2);
        1: r = xf8(x, 1'b1);
        2: r = xf4(x, 3);
        default: begin
          r = '{default: 0};
          r[0][0] = x[0][0] + x[0][1] + x[1][0] + x[1][1];
          r[0][1] = x[0][0] - x[0][1] + x[1][0] - x[1][1];
          r[1][0] = x[0][0] + x[0][1] - x[1][0] - x[1][1];
          r[1][1] = x[0][0] - x[0][1] - x[1][0] + x[1][1];
        end
      endcase
      // two cycles after the last input, or right after the previous
      // block's output if that is still running
      first = (cyc + 2 > prev_end) ? cyc + 2 : prev_end + 1;
      prev_end = first + nb - 1;
      for (int b = 0; b < nb; b++) begin
        e.kind = kind; e.beat = b; e.last = (b == nb - 1);
        e.due  = first + b;
        e.v    = '{default: 0};
        if (kind == 1) begin
          e.n = 8;
          for (int k = 0; k < 8; k++) e.v[k] = r[k][b];
        end else if (kind == 3) begin
          e.n = 4;
          for (int k = 0; k < 4; k++) e.v[k] = r[k/2][k%2];
        end else begin
          e.n = 8;
          for (int k = 0; k < 8; k++) e.v[k] = r[k%4][2*b + k/4];
        end
        q.push_back(e);
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (20) @(negedge clk);
    check(q.size() == 0, "all outputs seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
