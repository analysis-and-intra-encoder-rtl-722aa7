// tb_dp_ram: default-size dual-port RAM (128 x 152, the best-mode
// coefficient buffer). Both ports issue random reads and writes in the same
// cycles (never writing the same word twice in one cycle); reads return the
// word as it was before the cycle's writes, one cycle later.
//
// The expected values come from tb_ref_pkg, written from the standard's
// equations and not from the RTL. The stimulus mix, counts and watchdog
// limit are this testbench's own choices.
module tb_dp_ram;
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
  logic         a_en, a_we, b_en, b_we;
  logic [6:0]   a_addr, b_addr;
  logic [151:0] a_wdata, b_wdata, a_rdata, b_rdata;
  dp_ram dut (.*);
  logic [151:0] model [128];
  function automatic logic [151:0] rnd152();
    return {$urandom, $urandom, $urandom, $urandom, $urandom};
  endfunction
  initial begin
    logic [151:0] ea, eb;
    bit ra, rb;
    a_en = 1'b0; a_we = 1'b0; b_en = 1'b0; b_we = 1'b0;
    a_addr = '0; b_addr = '0; a_wdata = '0; b_wdata = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int a = 0; a < 128; a += 2) begin
      @(negedge clk);
      a_en = 1'b1; a_we = 1'b1; a_addr = 7'(a);     a_wdata = rnd152();
      b_en = 1'b1; b_we = 1'b1; b_addr = 7'(a + 1); b_wdata = rnd152();
      model[a] = a_wdata;
      model[a + 1] = b_wdata;
    end
    for (int n = 0; n < 20000; n++) begin
      @(negedge clk);
      a_en = $urandom_range(0, 3) != 0; a_we = $urandom_range(0, 1);
      b_en = $urandom_range(0, 3) != 0; b_we = $urandom_range(0, 1);
      a_addr = 7'($urandom_range(0, 127));
      b_addr = ($urandom_range(0, 3) == 0) ? a_addr : 7'($urandom_range(0, 127));
      if (a_en && a_we && b_en && b_we && a_addr == b_addr) b_we = 1'b0;
      a_wdata = rnd152();
      b_wdata = rnd152();
      ra = a_en && !a_we;
      rb = b_en && !b_we;
      ea = model[a_addr];
      eb = model[b_addr];
      if (a_en && a_we) model[a_addr] = a_wdata;
      if (b_en && b_we) model[b_addr] = b_wdata;
      @(negedge clk);
      if (ra) check(a_rdata == ea, "port A read");
      if (rb) check(b_rdata == eb, "port B read");
      a_en = 1'b0;
      b_en = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
