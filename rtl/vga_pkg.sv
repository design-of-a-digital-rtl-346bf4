// Shared constants and types of the FPGA display controller.
//
// The controller paints an 80 x 60 character screen (8 x 8 pixel cells) on a
// 640 x 480, 60 Hz VGA raster. The raster numbers are the industry 640 x 480
// timing (25 MHz pixel clock, 800 clocks per line, 521 lines per frame); the
// cell size, the SPI frame layout and the glyph set are this design's choices.
package vga_pkg;

  // Horizontal timing in pixel clocks: display, front porch, sync pulse, back porch
  localparam int unsigned H_DISP = 640;
  localparam int unsigned H_FP   = 16;
  localparam int unsigned H_PW   = 96;
  localparam int unsigned H_BP   = 48;

  // Vertical timing in lines
  localparam int unsigned V_DISP = 480;
  localparam int unsigned V_FP   = 10;
  localparam int unsigned V_PW   = 2;
  localparam int unsigned V_BP   = 29;

  // Character cells and text grid
  localparam int unsigned CELL_W    = 8;
  localparam int unsigned CELL_H    = 8;
  localparam int unsigned TEXT_COLS = H_DISP / CELL_W;   // 80
  localparam int unsigned TEXT_ROWS = V_DISP / CELL_H;   // 60

  // Character generator: 64 glyphs of 8 rows of 8 pixels
  localparam int unsigned GLYPH_W     = 6;               // glyph index bits
  localparam logic [GLYPH_W-1:0] GLYPH_BLANK   = '0;     // the space glyph
  localparam logic [GLYPH_W-1:0] GLYPH_UNKNOWN = '1;     // solid box

  // SPI transfer from the microcontroller: one 32-bit word, MSB first
  localparam int unsigned SPI_FRAME_W = 32;

  // Layout of one character update word
  typedef struct packed {
    logic [7:0] row;      // text row, 0 at the top
    logic [7:0] col;      // text column, 0 at the left
    logic [7:0] rsvd;     // ignored
    logic [7:0] code;     // ASCII code, or 0x00-0x0F for a binary nibble
  } spi_frame_t;

  // States of the general control unit
  typedef enum logic [2:0] {
    S_INIT      = 3'd0,   // wait for a received SPI word
    S_ADDR_RAM  = 3'd1,   // compute the display RAM address of the cell
    S_BIN2ASCII = 3'd2,   // look the code up in the translation table
    S_READ_DATA = 3'd3,   // place the glyph in the memory read by the raster
    S_VGA       = 3'd4    // hand the RAM port back to the raster
  } ctrl_state_t;

endpackage
