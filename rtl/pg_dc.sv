// pg_dc: DC-mode prediction value for every block size.
//
// One unit serves 4x4, 8x8 and 16x16 luma and the 4x4 pieces of a chroma
// block, since DC prediction is used for only about a fifth of the blocks.
// With N = 4, 8 or 16 neighbours per side (top[0..N-1], left[0..N-1]):
//   both sides available : (sum_top + sum_left + N) >> log2(2N)
//   one side available   : (sum_side + N/2) >> log2(N)
//   none                 : 128
// For BLK_CHROMA, top[0..7] and left[0..7] are the 8-pixel edges of the
// chroma block and the piece at (cblk[0], cblk[1]) = (x, y) in 4x4 units
// sums its own half of each (top[4x..4x+3], left[4y..4y+3]); it follows
// H.264: pieces (0,0) and (1,1) use both sides, piece (1,0)
// prefers the top and piece (0,1) the left side alone.
// Result registered one cycle after in_valid; out_p is one pixel value
// that fills the whole block.
module pg_dc
  import svc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  blk_e       in_blk,
  input  logic [1:0] cblk,
  input  pix_t       top [16],
  input  pix_t       left [16],
  input  logic       top_ok,
  input  logic       left_ok,
  output logic       out_valid,
  output pix_t       out_p
);
  logic [12:0] st, sl;
  logic [3:0]  lg;      // log2(N)
  pix_t        dc;
  logic        use_t, use_l;

  always_comb begin
    int n;
    case (in_blk)
      BLK_8X8:   begin n = 8;  lg = 4'd3; end
      BLK_16X16: begin n = 16; lg = 4'd4; end
      default:   begin n = 4;  lg = 4'd2; end
    endcase
    st = '0;
    sl = '0;
    for (int k = 0; k < 16; k++) begin
      if (in_blk == BLK_CHROMA) begin
        // the piece's own half of the 8-pixel chroma edges
        if (k / 4 == int'(cblk[0])) st += 13'(top[k]);
        if (k / 4 == int'(cblk[1])) sl += 13'(left[k]);
      end else if (k < n) begin
        st += 13'(top[k]);
        sl += 13'(left[k]);
      end
    end
    use_t = top_ok;
    use_l = left_ok;
    if (in_blk == BLK_CHROMA && cblk == 2'b01) begin       // x=1, y=0
      use_l = left_ok && !top_ok;
    end else if (in_blk == BLK_CHROMA && cblk == 2'b10) begin  // x=0, y=1
      use_t = top_ok && !left_ok;
    end
    if (use_t && use_l)  dc = pix_t'((st + sl + 13'(n)) >> (lg + 4'd1));
    else if (use_t)      dc = pix_t'((st + 13'(n / 2)) >> lg);
    else if (use_l)      dc = pix_t'((sl + 13'(n / 2)) >> lg);
    else                 dc = 8'd128;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_p     <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) out_p <= dc;
    end
  end
endmodule
