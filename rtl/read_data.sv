// Read Data: turns the raster position into pixels by reading the display
// RAM and the character ROM, and drives the VGA port.
//
// At the first pixel of each 8-pixel character cell the unit reads the cell's
// glyph index from the display RAM (address row * TEXT_COLS + column); one
// clock later it reads the glyph's pixel row from the character ROM; one
// clock after that the eight pixels are shifted out, leftmost first. The
// sync signals and the display enable are delayed along the same three-stage
// pipeline, so the VGA outputs (all registered) lag the synchronism generator
// by three clocks and stay aligned with each other. Set pixels show
// FG_RGB, clear pixels BG_RGB, blanking is black. The RAM port is used only at
// the first pixel of a visible cell, which leaves the other seven clocks for
// updates. The pipeline and colours are this design's choices.
module read_data
  import vga_pkg::*;
#(
  parameter int unsigned XW     = 10,
  parameter int unsigned YW     = 10,
  parameter int unsigned ADDR_W = $clog2(TEXT_COLS * TEXT_ROWS),
  parameter logic [2:0]  FG_RGB = 3'b111,
  parameter logic [2:0]  BG_RGB = 3'b000
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // raster position from the synchronism generator
  input  logic [XW-1:0]             x,
  input  logic [YW-1:0]             y,
  input  logic                      de,
  input  logic                      hsync_n,
  input  logic                      vsync_n,
  // display RAM read port
  output logic                      rd_req,
  output logic [ADDR_W-1:0]         rd_addr,
  input  logic [GLYPH_W-1:0]        ram_rdata,
  // character ROM
  output logic                      rom_en,
  output logic [GLYPH_W-1:0]        rom_glyph,
  output logic [$clog2(CELL_H)-1:0] rom_row,
  input  logic [CELL_W-1:0]         rom_bits,
  // VGA port
  output logic                      vga_hsync_n,
  output logic                      vga_vsync_n,
  output logic [2:0]                vga_rgb
);

  localparam int unsigned CX_W = $clog2(CELL_W);
  localparam int unsigned CY_W = $clog2(CELL_H);

  // stage 0: RAM read at the first pixel of a visible cell
  always_comb begin
    rd_req  = de && (x[CX_W-1:0] == '0);
    rd_addr = ADDR_W'(32'(y >> CY_W) * TEXT_COLS + 32'(x >> CX_W));
  end

  // stage 1: ROM read with the glyph from the RAM
  logic            de1, hs1, vs1, load1;
  logic [CY_W-1:0] row1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      de1 <= 1'b0; hs1 <= 1'b1; vs1 <= 1'b1; load1 <= 1'b0; row1 <= '0;
    end else begin
      de1 <= de; hs1 <= hsync_n; vs1 <= vsync_n; load1 <= rd_req;
      row1 <= y[CY_W-1:0];
    end
  end

  assign rom_en    = load1;
  assign rom_glyph = ram_rdata;
  assign rom_row   = row1;

  // stage 2: pixel serialiser
  logic              de2, hs2, vs2, load2;
  logic [CELL_W-1:0] shreg;
  logic              pix;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      de2 <= 1'b0; hs2 <= 1'b1; vs2 <= 1'b1; load2 <= 1'b0;
    end else begin
      de2 <= de1; hs2 <= hs1; vs2 <= vs1; load2 <= load1;
    end
  end

  assign pix = load2 ? rom_bits[CELL_W-1] : shreg[CELL_W-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     shreg <= '0;
    else if (load2) shreg <= rom_bits << 1;
    else            shreg <= shreg << 1;
  end

  // stage 3: VGA port registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vga_hsync_n <= 1'b1;
      vga_vsync_n <= 1'b1;
      vga_rgb     <= '0;
    end else begin
      vga_hsync_n <= hs2;
      vga_vsync_n <= vs2;
      vga_rgb     <= !de2 ? 3'b000 : (pix ? FG_RGB : BG_RGB);
    end
  end

endmodule
