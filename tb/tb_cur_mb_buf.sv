// tb_cur_mb_buf: fills the buffer with two random pictures' macroblocks
// (luma and chroma) through the load port, using the word map (luma word
// {pic, blk8, b4row, h, b4col}, chroma at 64 + 16 pic + 8 (Cr) + {b4row, h,
// b4col}, 4x2 pixels per word), then reads every 4x4 block and every row
// pair of every 8x8 block of both pictures and all components, comparing
// the 16 pixels with the source images one cycle after the request.
//
// The expected values come from tb_ref_pkg, written from the standard's
// equations and not from the RTL. The stimulus mix, counts and watchdog
// limit are this testbench's own choices.
module tb_cur_mb_buf;
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
  logic        ld_en, rd_en, rd_pic, rd_b4row, rd_b4col, rd_h, rd_rows8, rd_valid;
  logic [6:0]  ld_addr;
  logic [63:0] ld_data;
  logic [1:0]  rd_comp, rd_blk8;
  pix_t        rd_pix [16];
  cur_mb_buf dut (.*);

  // img[pic][comp][y][x]: luma 16x16, chroma 8x8
  int img [2][3][16][16];

  function automatic logic [6:0] waddr(int pic, int comp, int y, int x);
    // word holding pixel (x, y), x a multiple of 4, y even
    int blk8, b4row, b4col, h;
    if (comp == 0) begin
      blk8 = 2 * (y / 8) + x / 8;
      b4row = (y % 8) / 4; b4col = (x % 8) / 4; h = (y % 4) / 2;
      return 7'(32 * pic + 8 * blk8 + 4 * b4row + 2 * h + b4col);
    end
    b4row = y / 4; b4col = x / 4; h = (y % 4) / 2;
    return 7'(64 + 16 * pic + 8 * (comp - 1) + 4 * b4row + 2 * h + b4col);
  endfunction

  task automatic rd(input int pic, input int comp, input int blk8, input int b4r, input int b4c,
                    input int h, input bit rows8);
    int x0, y0, e;
    @(negedge clk);
    rd_en = 1'b1; rd_pic = pic[0]; rd_comp = 2'(comp); rd_blk8 = 2'(blk8);
    rd_b4row = b4r[0]; rd_b4col = b4c[0]; rd_h = h[0]; rd_rows8 = rows8;
    @(negedge clk);
    rd_en = 1'b0;
    check(rd_valid, "read latency");
    x0 = (comp == 0) ? 8 * (blk8 % 2) : 0;
    y0 = (comp == 0) ? 8 * (blk8 / 2) : 0;
    for (int k = 0; k < 16; k++) begin
      if (rows8) e = img[pic][comp][y0 + 4 * b4r + 2 * h + k / 8][x0 + k % 8];
      else       e = img[pic][comp][y0 + 4 * b4r + k / 4][x0 + 4 * b4c + k % 4];
      check(int'(rd_pix[k]) == e, $sformatf("pic %0d comp %0d blk8 %0d b4 %0d,%0d h %0d rows8 %0d px %0d got %0d exp %0d",
                                            pic, comp, blk8, b4r, b4c, h, rows8, k, rd_pix[k], e));
    end
  endtask

  initial begin
    ld_en = 1'b0; ld_addr = '0; ld_data = '0;
    rd_en = 1'b0; rd_pic = 1'b0; rd_comp = '0; rd_blk8 = '0;
    rd_b4row = 1'b0; rd_b4col = 1'b0; rd_h = 1'b0; rd_rows8 = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int rep = 0; rep < 20; rep++) begin
      for (int p = 0; p < 2; p++)
        for (int c = 0; c < 3; c++)
          for (int y = 0; y < 16; y++)
            for (int x = 0; x < 16; x++) img[p][c][y][x] = $urandom_range(0, 255);
      for (int p = 0; p < 2; p++)
        for (int c = 0; c < 3; c++)
          for (int y = 0; y < ((c == 0) ? 16 : 8); y += 2)
            for (int x = 0; x < ((c == 0) ? 16 : 8); x += 4) begin
              @(negedge clk);
              ld_en = 1'b1;
              ld_addr = waddr(p, c, y, x);
              for (int k = 0; k < 8; k++) ld_data[8*k +: 8] = 8'(img[p][c][y + k / 4][x + k % 4]);
            end
      @(negedge clk);
      ld_en = 1'b0;
      for (int p = 0; p < 2; p++)
        for (int c = 0; c < 3; c++)
          for (int b8 = 0; b8 < ((c == 0) ? 4 : 1); b8++)
            for (int r = 0; r < 2; r++) begin
              for (int cc = 0; cc < 2; cc++) rd(p, c, b8, r, cc, 0, 1'b0);
              for (int h = 0; h < 2; h++) rd(p, c, b8, r, 0, h, 1'b1);
            end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
