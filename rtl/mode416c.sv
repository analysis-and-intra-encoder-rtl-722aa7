// mode416c: TraDED mode decision for intra 4x4, intra 16x16 and chroma.
//
// Reads the edge intensities of a block and returns a 9-bit mode-enable
// word (bit m set = mode m is a candidate), registered, one cycle after
// in_valid.
//   4x4: DC is kept on a picture boundary and otherwise dropped when
//     I_DC < TH4_OFF*I_AC. If I_DC > TH4_DOM*I_AC (DC dominant) only the
//     stronger of vertical/horizontal is kept. Else a clear vertical edge
//     (I_V largest and I_V > 2*I_H) gives modes 0,5,7, a clear horizontal
//     edge (I_H largest and 2*I_V < I_H) modes 1,6,8, otherwise the
//     diagonals 3,4 plus 5,7 when I_V+I_DV >= I_H+I_DH, or 6,8. The most
//     probable mode is added when fewer than four AC modes were chosen.
//   16x16 (modes 0 V, 1 H, 2 DC, 3 plane): DC is on at a boundary or when
//     I_DC >= TH16_OFF*I_AC; one more mode, the one whose intensity among
//     I_V, I_H, I_D is largest.
//   chroma (modes 0 DC, 1 H, 2 V, 3 plane): DC always on, plus the mode of
//     the largest of I_H, I_V, I_D.
// Modes whose neighbours are missing (top_ok / left_ok) are removed.
// Thresholds default to the values used in the design's evaluation; the
// tie-break order (V before H before D) is this implementation's choice.
module mode416c
  import svc_pkg::*;
#(
  parameter logic [7:0] TH4_DOM  = 8'd16,
  parameter logic [7:0] TH4_OFF  = 8'd2,
  parameter logic [7:0] TH16_OFF = 8'd2
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  blk_e       in_blk,
  input  intens_t    in_it,
  input  logic       top_ok,
  input  logic       left_ok,
  input  logic [3:0] mpm,
  output logic       out_valid,
  output logic [8:0] out_en
);
  logic [8:0] en;
  logic       vmax, hmax;

  always_comb begin
    vmax = (in_it.v >= in_it.h) && (in_it.v >= in_it.d);
    hmax = !vmax && (in_it.h >= in_it.d);
    en   = '0;
    case (in_blk)
      BLK_16X16: begin
        en[2] = !(top_ok && left_ok) ||
                !(32'(in_it.dc) < 32'(TH16_OFF) * 32'(in_it.ac));
        if (vmax)      en[0] = top_ok;
        else if (hmax) en[1] = left_ok;
        else           en[3] = top_ok && left_ok;
      end
      BLK_CHROMA: begin
        en[0] = 1'b1;
        if (vmax)      en[2] = top_ok;
        else if (hmax) en[1] = left_ok;
        else           en[3] = top_ok && left_ok;
      end
      default: en = traded_nxn(in_it, TH4_DOM, TH4_OFF, mpm, top_ok, left_ok);
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_en    <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) out_en <= en;
    end
  end
endmodule
