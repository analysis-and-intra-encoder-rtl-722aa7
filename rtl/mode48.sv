// mode48: TraDED mode decision for intra 4x4 and intra 8x8 blocks.
//
// Same decision flow for both sizes (see mode416c for the 4x4 rules); only
// the DC-dominant and DC-off thresholds differ: TH4_DOM / TH4_OFF for
// BLK_4X4 and TH8_DOM / TH8_OFF for BLK_8X8 (defaults 16/2 and 64/2, the
// design's evaluation settings). Output: registered 9-bit mode-enable word,
// one cycle after in_valid.
//
// The rules and thresholds follow the TraDED decision flow; comparing
// ratios as products, the availability masks and the registered output
// are this design's own choices.
module mode48
  import svc_pkg::*;
#(
  parameter logic [7:0] TH4_DOM = 8'd16,
  parameter logic [7:0] TH4_OFF = 8'd2,
  parameter logic [7:0] TH8_DOM = 8'd64,
  parameter logic [7:0] TH8_OFF = 8'd2
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
  always_comb begin
    if (in_blk == BLK_8X8) en = traded_nxn(in_it, TH8_DOM, TH8_OFF, mpm, top_ok, left_ok);
    else                   en = traded_nxn(in_it, TH4_DOM, TH4_OFF, mpm, top_ok, left_ok);
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
