// cur_mb_buf: current-macroblock buffer for two pictures coded in parallel.
//
// A dual-port 96 x 64-bit RAM (8 pixels per word). Words 0..31 hold the
// luma of picture 0 and 32..63 that of picture 1; 64..95 hold chroma
// (Cb then Cr of picture 0, then of picture 1, 8 words each). Inside an
// 8x8 block (luma quadrant, or a whole chroma component) the word address
// is {b4row, h, b4col}: the word holds a 4-wide, 2-high piece of 4x4 block
// (b4row, b4col), rows 2h and 2h+1, pixels row-major in bytes 0..7. So a
// 4x4 block is the two words that differ in address bit 1, and two full
// 8-pixel rows of an 8x8 block are the two words that differ in bit 0;
// both ports read one of the pair, giving 16 pixels per cycle.
// Loading: ld_en writes ld_data at ld_addr through port A (a read issued
// in the same cycle is not allowed, asserted).
// Reading: rd_en with the block coordinates; rd_pix is valid one cycle
// later (rd_valid): rd_rows8 = 0 returns 4x4 block (b4row, b4col)
// row-major; rd_rows8 = 1 returns rows 4*b4row+2h and +1 of the 8x8 block
// (rd_pix[0..7] the first row, [8..15] the second).
//
// Size (96 x 64, two macroblocks) and the word layout (4x2 pixels per
// word, 8x8 quadrants in raster order, Cb then Cr per picture) follow the
// encoder's current-MB memory organisation; splitting it into two 48-word
// banks for a 16-pixel read per cycle is this design's own choice.
//
// Lint note: rst_n is reported as used both synchronously and
// asynchronously (SYNCASYNCNET) because the assertion at the end samples it
// in its disable iff clause; the flip-flops use it asynchronously only.
module cur_mb_buf
  import svc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ld_en,
  input  logic [6:0]  ld_addr,
  input  logic [63:0] ld_data,
  input  logic        rd_en,
  input  logic        rd_pic,
  input  logic [1:0]  rd_comp,    // 0 luma, 1 Cb, 2 Cr
  input  logic [1:0]  rd_blk8,    // luma 8x8 quadrant (raster order)
  input  logic        rd_b4row,
  input  logic        rd_b4col,
  input  logic        rd_h,
  input  logic        rd_rows8,
  output logic        rd_valid,
  output pix_t        rd_pix [16]
);
  logic [6:0]  base, a_addr, b_addr;
  logic [63:0] a_q, b_q;
  logic        rows8_q;

  always_comb begin
    if (rd_comp == 2'd0) base = {1'b0, rd_pic, rd_blk8, 3'b000};
    else                 base = 7'd64 + {2'b00, rd_pic, (rd_comp == 2'd2), 3'b000};
    if (rd_rows8) begin
      a_addr = base | {4'b0, rd_b4row, rd_h, 1'b0};
      b_addr = base | {4'b0, rd_b4row, rd_h, 1'b1};
    end else begin
      a_addr = base | {4'b0, rd_b4row, 1'b0, rd_b4col};
      b_addr = base | {4'b0, rd_b4row, 1'b1, rd_b4col};
    end
  end

  dp_ram #(.DEPTH(96), .WIDTH(64)) u_ram (
    .clk    (clk),
    .a_en   (ld_en || rd_en),
    .a_we   (ld_en),
    .a_addr (ld_en ? ld_addr : a_addr),
    .a_wdata(ld_data),
    .a_rdata(a_q),
    .b_en   (rd_en),
    .b_we   (1'b0),
    .b_addr (b_addr),
    .b_wdata('0),
    .b_rdata(b_q)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_valid <= 1'b0;
      rows8_q  <= 1'b0;
    end else begin
      rd_valid <= rd_en && !ld_en;
      rows8_q  <= rd_rows8;
    end
  end

  // word A = left/top piece, word B = right/bottom piece
  always_comb begin
    for (int k = 0; k < 16; k++) begin
      if (rows8_q) rd_pix[k] = (k % 8 < 4) ? a_q[8*(4*(k/8) + k%4) +: 8]
                                          : b_q[8*(4*(k/8) + k%4) +: 8];
      else         rd_pix[k] = (k < 8) ? a_q[8*(k%8) +: 8] : b_q[8*(k%8) +: 8];
    end
  end

  a_no_ld_rd: assert property (@(posedge clk) disable iff (!rst_n) !(ld_en && rd_en));
endmodule
