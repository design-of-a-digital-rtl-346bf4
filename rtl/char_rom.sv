// Character generator ROM: the pixel rows of every glyph the screen can show.
//
// The ROM holds the 64 glyphs of font_pkg, 8 rows each; a row is one byte
// with bit 7 the leftmost pixel. The glyph numbering is the one the
// translation table in bin2ascii produces. The read is synchronous:
// `row_bits` shows row `row` of glyph `glyph` one clock after a clock with
// `en` high and holds otherwise, so the ROM maps onto one FPGA block RAM.
// The document only names the ROMs; glyph size, glyph set and bit order are
// this design's choices.
module char_rom
  import vga_pkg::*;
  import font_pkg::*;
#(
  parameter int unsigned ROW_W = $clog2(CELL_H)
) (
  input  logic                 clk,
  input  logic                 en,
  input  logic [GLYPH_W-1:0]   glyph,
  input  logic [ROW_W-1:0]     row,
  output logic [CELL_W-1:0]    row_bits
);

  logic [63:0] g_bits;

  assign g_bits = FONT[glyph];

  always_ff @(posedge clk) begin
    if (en) row_bits <= g_bits[CELL_W * (CELL_H - 1 - 32'(row)) +: CELL_W];
  end

endmodule
