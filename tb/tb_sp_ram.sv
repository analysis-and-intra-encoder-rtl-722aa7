// tb_sp_ram: default-size single-port RAM (128 x 64). Random mixes of full
// and bit-masked writes and reads against a model array; read data must
// appear one cycle after the read and hold through write and idle cycles.
//
// The expected values come from tb_ref_pkg, written from the standard's
// equations and not from the RTL. The stimulus mix, counts and watchdog
// limit are this testbench's own choices.
module tb_sp_ram;
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
  logic        en, we;
  logic [6:0]  addr;
  logic [63:0] wdata, wmask, rdata;
  sp_ram dut (.*);
  logic [63:0] model [128];
  initial begin
    logic [63:0] last;
    int nread = 0;
    en = 1'b0; we = 1'b0; addr = '0; wdata = '0; wmask = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int a = 0; a < 128; a++) begin
      @(negedge clk);
      en = 1'b1; we = 1'b1; addr = 7'(a);
      wdata = {$urandom, $urandom}; wmask = '1;
      model[a] = wdata;
    end
    last = 'x;
    for (int n = 0; n < 20000; n++) begin
      int op;
      op = $urandom_range(0, 3);
      @(negedge clk);
      en = (op != 3); we = (op == 0); addr = 7'($urandom_range(0, 127));
      wdata = {$urandom, $urandom};
      wmask = ($urandom_range(0, 1) == 1) ? '1 : {$urandom, $urandom};
      if (op == 0) model[addr] = (model[addr] & ~wmask) | (wdata & wmask);
      @(negedge clk);
      if (op == 1 || op == 2) begin
        check(rdata == model[addr], $sformatf("read %0d", addr));
        last = rdata;
        nread++;
      end else if (nread > 0) begin
        check(rdata == last, "read data held");
      end
      en = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
