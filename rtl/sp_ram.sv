// sp_ram: single-port synchronous RAM with a per-bit write mask.
//
// One access per cycle: when en is high, a write (we = 1) stores
// wdata into the bits of word addr selected by wmask; a read (we = 0)
// returns word addr on rdata one cycle later. rdata holds its value while
// en is low. Written as an array so synthesis maps it to a RAM macro; the
// encoder's single-port buffers (neighbour pixels 960x64, neighbour modes
// 240x16, base/enhancement-layer coefficient and pixel buffers) are
// instances with their DEPTH and WIDTH.
//
// Interface: clk, en, we, addr, wdata, wmask -> rdata. The depths and widths
// follow the encoder's memory list; the write mask and the read-hold
// behaviour are this design's own choices.
module sp_ram #(
  parameter int unsigned DEPTH = 128,
  parameter int unsigned WIDTH = 64,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             en,
  input  logic             we,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [WIDTH-1:0] wmask,
  output logic [WIDTH-1:0] rdata
);
  logic [WIDTH-1:0] mem [DEPTH];
  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= (mem[addr] & ~wmask) | (wdata & wmask);
      else    rdata     <= mem[addr];
    end
  end
endmodule
