// Port control of the display RAM: shares its single port between the raster
// reader and the update writes of the control unit.
//
// The raster cannot wait, so its read request always wins. A write request is
// granted in any clock in which the reader does not use the port; the reader
// needs the RAM only once per character cell (one clock in eight during the
// visible part of a line, never during blanking), so a write waits at most one
// clock. `wr_grant` is high in the clock in which the write reaches the RAM.
// All paths are combinational. The arbitration rule is this design's choice:
// the document gives this unit only its name.
module ram_port_ctrl #(
  parameter int unsigned ADDR_W = $clog2(vga_pkg::TEXT_COLS * vga_pkg::TEXT_ROWS),
  parameter int unsigned WIDTH  = vga_pkg::GLYPH_W
) (
  input  logic              clk,
  input  logic              rst_n,
  // raster reader
  input  logic              rd_req,
  input  logic [ADDR_W-1:0] rd_addr,
  // control unit writes
  input  logic              wr_req,
  input  logic [ADDR_W-1:0] wr_addr,
  input  logic [WIDTH-1:0]  wr_data,
  output logic              wr_grant,
  // RAM port
  output logic              ram_en,
  output logic              ram_we,
  output logic [ADDR_W-1:0] ram_addr,
  output logic [WIDTH-1:0]  ram_wdata
);

  always_comb begin
    wr_grant  = wr_req && !rd_req;
    ram_en    = rd_req || wr_req;
    ram_we    = wr_grant;
    ram_addr  = rd_req ? rd_addr : wr_addr;
    ram_wdata = wr_data;
  end

  // A write never takes the port from a raster read.
  a_read_priority: assert property (@(posedge clk) disable iff (!rst_n)
    rd_req |-> (!ram_we && ram_addr == rd_addr));

endmodule
