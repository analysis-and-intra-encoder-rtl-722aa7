// itran: inverse transform with 8-coefficient throughput.
//
// One row unit and one column unit (itu8) around two transposition
// register banks used in ping-pong: while the column unit reads one
// block's bank, the row unit fills the other.
//   IT_4X4 : 2 input beats (rows 0-1, then rows 2-3, 4 coefficients each,
//            row-major in in_c[0..7]); 2 output beats, beat k holding
//            columns 2k and 2k+1 (out_r[0..3] = column 2k rows 0..3,
//            out_r[4..7] = column 2k+1); result (x + 32) >> 6.
//   IT_8X8 : 8 input beats (one row each); 8 output beats, beat k = column
//            k rows 0..7; result (x + 32) >> 6.
//   IT_HAD4: inverse 4x4 Hadamard of luma DC terms, beats as IT_4X4, no
//            final shift (scaling follows in dequant8).
//   IT_HAD2: inverse 2x2 Hadamard of chroma DC terms c0..c3 in in_c[0..3];
//            1 input beat, 1 output beat in out_r[0..3].
// Input is accepted when in_ready (the bank to be written is free); the
// first output beat appears two cycles after a block's last input beat.
// Output beats of a block are consecutive; out_last marks the last one.
module itran
  import svc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  output logic       in_ready,
  input  logic [1:0] in_kind,   // 0 IT_4X4, 1 IT_8X8, 2 IT_HAD4, 3 IT_HAD2
  input  coef_t      in_c [8],
  output logic       out_valid,
  output logic [1:0] out_kind,
  output logic [2:0] out_beat,
  output logic       out_last,
  output coef_t      out_r [8]
);
  localparam logic [1:0] IT_8X8 = 2'd1, IT_HAD4 = 2'd2, IT_HAD2 = 2'd3;

  logic signed [19:0] bank [2][8][8];
  logic [1:0]         bkind [2];
  logic [1:0]         full;
  logic               wb, rb;
  logic [2:0]         wcnt, rcnt;

  logic signed [19:0] hx [8], hy [8], vx [8], vy [8];
  logic [1:0]         hk, vk;

  function automatic logic [2:0] last_beat(input logic [1:0] k);
    case (k)
      IT_8X8:  return 3'd7;
      IT_HAD2: return 3'd0;
      default: return 3'd1;
    endcase
  endfunction

  assign in_ready = !full[wb];

  // row unit
  always_comb begin
    for (int k = 0; k < 8; k++) hx[k] = 20'(in_c[k]);
    case (in_kind)
      IT_8X8:  hk = 2'd0;
      IT_HAD4: hk = 2'd2;
      default: hk = 2'd1;
    endcase
  end
  itu8 u_row (.kind(hk), .x(hx), .y(hy));

  // column unit
  always_comb begin
    for (int k = 0; k < 8; k++) vx[k] = '0;
    case (bkind[rb])
      IT_8X8: for (int r = 0; r < 8; r++) vx[r] = bank[rb][r][rcnt];
      default: for (int r = 0; r < 4; r++) begin
        vx[r]   = bank[rb][r][{1'b0, rcnt[0], 1'b0}];
        vx[4+r] = bank[rb][r][{1'b0, rcnt[0], 1'b1}];
      end
    endcase
    case (bkind[rb])
      IT_8X8:  vk = 2'd0;
      IT_HAD4: vk = 2'd2;
      default: vk = 2'd1;
    endcase
  end
  itu8 u_col (.kind(vk), .x(vx), .y(vy));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full  <= '0;
      wb    <= 1'b0;
      rb    <= 1'b0;
      wcnt  <= '0;
      rcnt  <= '0;
      bkind <= '{default: '0};
      out_valid <= 1'b0;
      out_kind  <= '0;
      out_beat  <= '0;
      out_last  <= 1'b0;
      for (int k = 0; k < 8; k++) out_r[k] <= '0;
      for (int b = 0; b < 2; b++)
        for (int r = 0; r < 8; r++)
          for (int c = 0; c < 8; c++) bank[b][r][c] <= '0;
    end else begin
      // ---- write side
      if (in_valid && in_ready) begin
        case (in_kind)
          IT_8X8: for (int c = 0; c < 8; c++) bank[wb][wcnt][c] <= hy[c];
          IT_HAD2: begin
            bank[wb][0][0] <= 20'(in_c[0]) + 20'(in_c[1]) + 20'(in_c[2]) + 20'(in_c[3]);
            bank[wb][0][1] <= 20'(in_c[0]) - 20'(in_c[1]) + 20'(in_c[2]) - 20'(in_c[3]);
            bank[wb][0][2] <= 20'(in_c[0]) + 20'(in_c[1]) - 20'(in_c[2]) - 20'(in_c[3]);
            bank[wb][0][3] <= 20'(in_c[0]) - 20'(in_c[1]) - 20'(in_c[2]) + 20'(in_c[3]);
          end
          default: for (int c = 0; c < 4; c++) begin
            bank[wb][{1'b0, wcnt[0], 1'b0}][c] <= hy[c];
            bank[wb][{1'b0, wcnt[0], 1'b1}][c] <= hy[4+c];
          end
        endcase
        if (wcnt == last_beat(in_kind)) begin
          wcnt      <= '0;
          full[wb]  <= 1'b1;
          bkind[wb] <= in_kind;
          wb        <= !wb;
        end else begin
          wcnt <= wcnt + 3'd1;
        end
      end
      // ---- read side
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      if (full[rb]) begin
        out_valid <= 1'b1;
        out_kind  <= bkind[rb];
        out_beat  <= rcnt;
        for (int k = 0; k < 8; k++) begin
          case (bkind[rb])
            IT_HAD2: out_r[k] <= (k < 4) ? coef_t'(bank[rb][0][k]) : '0;
            IT_HAD4: out_r[k] <= coef_t'(vy[k]);
            default: out_r[k] <= coef_t'((vy[k] + 20'sd32) >>> 6);
          endcase
        end
        if (rcnt == last_beat(bkind[rb])) begin
          out_last <= 1'b1;
          rcnt     <= '0;
          full[rb] <= 1'b0;
          rb       <= !rb;
        end else begin
          rcnt <= rcnt + 3'd1;
        end
      end
    end
  end
endmodule
