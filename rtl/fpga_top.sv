// FPGA side of a stand-alone cash register: a character display controller
// that a microcontroller fills over SPI and that refreshes a VGA/CRT monitor.
//
// Data path: the SPI interface (spi_slave) receives 32-bit update words
// {row, column, unused, code}; the general control unit (ctrl_fsm) turns each
// word into a display RAM address, has the translation table (bin2ascii) map
// the code to a glyph of the character ROM, and writes the glyph into the
// display RAM (text_ram) through the RAM port control (ram_port_ctrl). In
// parallel the synchronism generator (vga_sync) scans a 640 x 480 raster and
// the Read Data unit (read_data) fetches, for each 8 x 8 cell, the glyph from
// the display RAM and its pixel rows from the character ROM (char_rom) and
// drives the VGA port. The screen is 80 columns by 60 rows of characters.
//
// Interface: `clk` is the 25 MHz pixel clock, `rst_n` an asynchronous
// active-low reset. SPI is mode 0, MSB first, SCK at most clk/8 (this design
// samples SCK with the pixel clock). VGA syncs are active low; vga_rgb is one
// bit per colour and lags the raster counters by three clocks. `upd_done`
// pulses once per update written (with `upd_unknown` also high if the code
// had no glyph) and `upd_dropped` once per word addressed off the screen.
// The block split follows the document's FPGA data path and control state
// machine; widths, timing values, word layout and glyph set are this design's.
module fpga_top
  import vga_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  // SPI link to the microcontroller
  input  logic       spi_cs_n,
  input  logic       spi_sck,
  input  logic       spi_mosi,
  output logic       spi_miso,
  // VGA port
  output logic       vga_hsync_n,
  output logic       vga_vsync_n,
  output logic [2:0] vga_rgb,
  // status
  output logic       upd_done,
  output logic       upd_unknown,
  output logic       upd_dropped
);

  localparam int unsigned ADDR_W = $clog2(TEXT_COLS * TEXT_ROWS);
  localparam int unsigned XW = $clog2(H_DISP + H_FP + H_PW + H_BP);
  localparam int unsigned YW = $clog2(V_DISP + V_FP + V_PW + V_BP);

  // SPI interface
  logic [SPI_FRAME_W-1:0] frame;
  logic                   frame_valid;

  spi_slave #(.FRAME_W(SPI_FRAME_W)) u_spi (
    .clk, .rst_n, .spi_cs_n, .spi_sck, .spi_mosi, .spi_miso,
    .frame, .frame_valid
  );

  // General control unit and translation table
  logic               b2a_en;
  logic [7:0]         b2a_code;
  logic [GLYPH_W-1:0] b2a_glyph;
  logic               b2a_known;
  logic               wr_req, wr_grant;
  logic [ADDR_W-1:0]  wr_addr;
  logic [GLYPH_W-1:0] wr_data;
  ctrl_state_t        state;

  ctrl_fsm #(.ADDR_W(ADDR_W)) u_ctrl (
    .clk, .rst_n,
    .frame_valid, .frame(spi_frame_t'(frame)),
    .b2a_en, .b2a_code, .b2a_glyph,
    .wr_req, .wr_addr, .wr_data, .wr_grant,
    .state, .done(upd_done), .dropped(upd_dropped)
  );

  bin2ascii u_b2a (
    .clk, .rst_n, .en(b2a_en), .code(b2a_code), .glyph(b2a_glyph), .known(b2a_known)
  );

  // `known` holds the result of the last lookup until the next one
  assign upd_unknown = upd_done && !b2a_known;

  // Display RAM and its port control
  logic               rd_req;
  logic [ADDR_W-1:0]  rd_addr;
  logic               ram_en, ram_we;
  logic [ADDR_W-1:0]  ram_addr;
  logic [GLYPH_W-1:0] ram_wdata, ram_rdata;

  ram_port_ctrl #(.ADDR_W(ADDR_W), .WIDTH(GLYPH_W)) u_port (
    .clk, .rst_n, .rd_req, .rd_addr, .wr_req, .wr_addr, .wr_data, .wr_grant,
    .ram_en, .ram_we, .ram_addr, .ram_wdata
  );

  text_ram #(.DEPTH(TEXT_COLS * TEXT_ROWS), .WIDTH(GLYPH_W)) u_ram (
    .clk, .en(ram_en), .we(ram_we), .addr(ram_addr), .wdata(ram_wdata), .rdata(ram_rdata)
  );

  // Raster: synchronism signals, character ROM and Read Data
  logic [XW-1:0] x;
  logic [YW-1:0] y;
  logic          de, hsync_n, vsync_n, frame_start;

  vga_sync u_sync (
    .clk, .rst_n, .x, .y, .hsync_n, .vsync_n, .de, .frame_start
  );

  logic                      rom_en;
  logic [GLYPH_W-1:0]        rom_glyph;
  logic [$clog2(CELL_H)-1:0] rom_row;
  logic [CELL_W-1:0]         rom_bits;

  char_rom u_rom (
    .clk, .en(rom_en), .glyph(rom_glyph), .row(rom_row), .row_bits(rom_bits)
  );

  read_data #(.XW(XW), .YW(YW), .ADDR_W(ADDR_W)) u_read (
    .clk, .rst_n, .x, .y, .de, .hsync_n, .vsync_n,
    .rd_req, .rd_addr, .ram_rdata,
    .rom_en, .rom_glyph, .rom_row, .rom_bits,
    .vga_hsync_n, .vga_vsync_n, .vga_rgb
  );

endmodule
