// tran48: forward 8x8 / 4x4 integer transform with 16-sample throughput.
//
// Two tu8 units transform rows, two transform columns, and an 8x8
// coefficient register sits between them.
//
// 8x8 mode (in_is4 = 0): a block enters as four beats of two rows each
// (in_x[0..7] = row 2k, in_x[8..15] = row 2k+1, k = beat 0..3). The four
// beats after the last one deliver the block as column pairs
// (out_y[0..7] = column 2k rows 0..7, out_y[8..15] = column 2k+1),
// out_beat = k. A column pair is read from the register in the same cycle
// as the matching row pair of the next block may be written there: each
// block is stored transposed with respect to the previous one (the
// orientation flag toggles), so blocks can follow back to back and the
// unit keeps 16 samples per cycle with a single 8x8 register. Latency from
// the last input beat to the first output beat is 1 cycle.
//
// 4x4 mode (in_is4 = 1): a whole 4x4 block enters in one beat (row-major);
// each tu8 runs two 4-point row transforms, the row result is held one
// cycle, and the column units finish it: out_y is the row-major 4x4
// result two cycles after the input.
//
// The column units are shared: a 4x4 block must not reach its column
// stage while an 8x8 block is being read out (asserted). The 8x8 weights
// and the odd-part shifts are the standard H.264 ones.
//
// Four 8-point units around an 8x8 coefficient register follow the
// encoder's combined transform module; the alternating register orientation
// and the 4x4 scheduling rule are this design's own choices.
//
// Lint note: rst_n is reported as used both synchronously and
// asynchronously (SYNCASYNCNET) because the assertion at the end samples it
// in its disable iff clause; the flip-flops use it asynchronously only.
module tran48
  import svc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic       in_is4,
  input  coef_t      in_x [16],
  output logic       out_valid,
  output logic       out_is4,
  output logic [1:0] out_beat,
  output coef_t      out_y [16]
);
  coef_t              m [8][8];       // coefficient register
  logic               wr_orient;      // orientation of the block being written
  logic               rd_orient;      // orientation of the block being read
  logic [1:0]         in_cnt;
  logic               rd_active;
  logic [1:0]         rd_cnt;
  coef_t              p4 [16];        // 4x4 row-transform result
  logic               p4_valid;

  logic signed [19:0] hx [2][8], hy [2][8];
  logic signed [19:0] vx [2][8], vy [2][8];
  logic               h_two4, v_two4;

  // row units
  assign h_two4 = in_is4;
  always_comb begin
    for (int u = 0; u < 2; u++)
      for (int k = 0; k < 8; k++) hx[u][k] = 20'(in_x[8*u+k]);
  end
  tu8 u_h0 (.two4(h_two4), .x(hx[0]), .y(hy[0]));
  tu8 u_h1 (.two4(h_two4), .x(hx[1]), .y(hy[1]));

  // column units: 8x8 read-out has priority, else the held 4x4 rows
  assign v_two4 = !rd_active;
  always_comb begin
    for (int u = 0; u < 2; u++)
      for (int k = 0; k < 8; k++) vx[u][k] = '0;
    if (rd_active) begin
      for (int u = 0; u < 2; u++)
        for (int r = 0; r < 8; r++)
          vx[u][r] = rd_orient ? 20'(m[2*rd_cnt+u][r]) : 20'(m[r][2*rd_cnt+u]);
    end else begin
      // unit u handles 4x4 columns 2u and 2u+1
      for (int u = 0; u < 2; u++)
        for (int r = 0; r < 4; r++) begin
          vx[u][r]   = 20'(p4[4*r+2*u]);
          vx[u][4+r] = 20'(p4[4*r+2*u+1]);
        end
    end
  end
  tu8 u_v0 (.two4(v_two4), .x(vx[0]), .y(vy[0]));
  tu8 u_v1 (.two4(v_two4), .x(vx[1]), .y(vy[1]));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_orient <= 1'b0;
      rd_orient <= 1'b0;
      in_cnt    <= '0;
      rd_active <= 1'b0;
      rd_cnt    <= '0;
      p4_valid  <= 1'b0;
      out_valid <= 1'b0;
      out_is4   <= 1'b0;
      out_beat  <= '0;
      for (int i = 0; i < 16; i++) begin
        p4[i]    <= '0;
        out_y[i] <= '0;
      end
      for (int r = 0; r < 8; r++)
        for (int c = 0; c < 8; c++) m[r][c] <= '0;
    end else begin
      // ---- input side
      p4_valid <= in_valid && in_is4;
      if (in_valid && in_is4) begin
        for (int u = 0; u < 2; u++)
          for (int k = 0; k < 8; k++) p4[8*u+k] <= coef_t'(hy[u][k]);
      end
      if (in_valid && !in_is4) begin
        for (int u = 0; u < 2; u++)
          for (int c = 0; c < 8; c++)
            if (wr_orient) m[c][2*in_cnt+u] <= coef_t'(hy[u][c]);
            else           m[2*in_cnt+u][c] <= coef_t'(hy[u][c]);
        in_cnt <= in_cnt + 2'd1;
        if (in_cnt == 2'd3) begin
          rd_active <= 1'b1;
          rd_cnt    <= '0;
          rd_orient <= wr_orient;
          wr_orient <= !wr_orient;
        end
      end
      // ---- output side
      out_valid <= 1'b0;
      if (rd_active) begin
        out_valid <= 1'b1;
        out_is4   <= 1'b0;
        out_beat  <= rd_cnt;
        for (int u = 0; u < 2; u++)
          for (int r = 0; r < 8; r++) out_y[8*u+r] <= coef_t'(vy[u][r]);
        rd_cnt <= rd_cnt + 2'd1;
        if (rd_cnt == 2'd3 && !(in_valid && !in_is4 && in_cnt == 2'd3)) rd_active <= 1'b0;
      end else if (p4_valid) begin
        out_valid <= 1'b1;
        out_is4   <= 1'b1;
        out_beat  <= '0;
        // vy[u][r] = coefficient (r, 2u); vy[u][4+r] = coefficient (r, 2u+1)
        for (int u = 0; u < 2; u++)
          for (int r = 0; r < 4; r++) begin
            out_y[4*r+2*u]   <= coef_t'(vy[u][r]);
            out_y[4*r+2*u+1] <= coef_t'(vy[u][4+r]);
          end
      end
    end
  end

  // A 4x4 block may not need the column units during an 8x8 read-out.
  a_no_clash: assert property (@(posedge clk) disable iff (!rst_n) !(rd_active && p4_valid));
endmodule
