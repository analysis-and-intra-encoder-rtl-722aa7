// dp_ram: true dual-port synchronous RAM, one clock.
//
// Ports A and B each read or write one word per cycle; a read returns the
// word one cycle later. Writing the same word from both ports in one cycle
// is not allowed (asserted); reading a word while the other port writes it
// returns the old contents. Used for the current-macroblock buffer (96x64)
// and the best-mode coefficient buffer (128x152).
//
// Ports: clk, {a,b}_en / _we / _addr / _wdata / _rdata. The sizes come from
// the encoder's buffer list; the read-old-data behaviour and the same-word
// write rule are this design's own choices.
module dp_ram #(
  parameter int unsigned DEPTH = 128,
  parameter int unsigned WIDTH = 152,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             a_en,
  input  logic             a_we,
  input  logic [AW-1:0]    a_addr,
  input  logic [WIDTH-1:0] a_wdata,
  output logic [WIDTH-1:0] a_rdata,
  input  logic             b_en,
  input  logic             b_we,
  input  logic [AW-1:0]    b_addr,
  input  logic [WIDTH-1:0] b_wdata,
  output logic [WIDTH-1:0] b_rdata
);
  logic [WIDTH-1:0] mem [DEPTH];
  always_ff @(posedge clk) begin
    if (a_en) begin
      if (a_we) mem[a_addr] <= a_wdata;
      else      a_rdata     <= mem[a_addr];
    end
    if (b_en) begin
      if (b_we) mem[b_addr] <= b_wdata;
      else      b_rdata     <= mem[b_addr];
    end
  end
  a_no_ww: assert property (@(posedge clk)
    !(a_en && a_we && b_en && b_we && a_addr == b_addr));
endmodule
