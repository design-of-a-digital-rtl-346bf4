// Display RAM: one glyph index per character cell of the screen.
//
// A single-port synchronous RAM of DEPTH words of WIDTH bits, addressed as
// row * TEXT_COLS + column. With `en` high a clock either writes `wdata`
// (`we` high) or reads: `rdata` then shows the addressed word one clock later
// and holds it otherwise. The array starts out as the blank glyph (FPGA block
// RAM takes its initial contents from the configuration), so the screen is
// empty after power-up. That a single port serves both the raster and the
// updates, and the blank start, are this design's choices.
module text_ram
  import vga_pkg::*;
#(
  parameter int unsigned DEPTH = TEXT_COLS * TEXT_ROWS,
  parameter int unsigned WIDTH = GLYPH_W,
  parameter int unsigned ADDR_W = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              en,
  input  logic              we,
  input  logic [ADDR_W-1:0] addr,
  input  logic [WIDTH-1:0]  wdata,
  output logic [WIDTH-1:0]  rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  initial begin
    for (int i = 0; i < int'(DEPTH); i++) mem[i] = '0;
  end

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end

endmodule
