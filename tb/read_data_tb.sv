// Testbench of read_data: the raster position is driven over a full 640 x 480
// frame (800 x 521 clocks), the display RAM and character ROM are modelled
// here with one clock of read latency (the ROM as a formula of glyph and row),
// and every VGA output is compared with the pixel expected three clocks after
// its raster position. It also checks that the RAM is read once per visible
// character cell at address row * 80 + column.
module read_data_tb;
  import vga_pkg::*;
  localparam int H_TOT = 800, V_TOT = 521;
  localparam int AW = $clog2(TEXT_COLS * TEXT_ROWS);

  logic clk = 1'b0, rst_n = 1'b0;
  logic [9:0] x = '0, y = '0;
  logic de = 1'b0, hs = 1'b1, vs = 1'b1;
  logic rd_req, rom_en;
  logic [AW-1:0] rd_addr;
  logic [GLYPH_W-1:0] ram_rdata, rom_glyph;
  logic [2:0] rom_row;
  logic [7:0] rom_bits;
  logic vga_hs, vga_vs;
  logic [2:0] vga_rgb;
  logic [GLYPH_W-1:0] mem [TEXT_COLS * TEXT_ROWS];
  int checks = 0, failures = 0;

  always #20 clk = ~clk;

  read_data dut (
    .clk, .rst_n, .x, .y, .de, .hsync_n(hs), .vsync_n(vs),
    .rd_req, .rd_addr, .ram_rdata, .rom_en, .rom_glyph, .rom_row, .rom_bits,
    .vga_hsync_n(vga_hs), .vga_vsync_n(vga_vs), .vga_rgb
  );

  function automatic logic [7:0] font(input logic [GLYPH_W-1:0] g, input logic [2:0] r);
    return 8'(int'(g) * 37 + int'(r) * 91 + 3);
  endfunction

  always_ff @(posedge clk) begin
    if (rd_req) ram_rdata <= mem[rd_addr];
    if (rom_en) rom_bits <= font(rom_glyph, rom_row);
  end

  initial begin
    repeat (2 * H_TOT * V_TOT) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2:0] e_rgb [4];
    logic       e_hs [4], e_vs [4];
    int bad, reads, bad_reads;
    logic [7:0] bits;
    for (int i = 0; i < TEXT_COLS * TEXT_ROWS; i++) mem[i] = GLYPH_W'($urandom());
    for (int i = 0; i < 4; i++) begin e_rgb[i] = '0; e_hs[i] = 1'b1; e_vs[i] = 1'b1; end
    ram_rdata = '0; rom_bits = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    bad = 0; reads = 0; bad_reads = 0;
    for (int t = 0; t < H_TOT * V_TOT + 4; t++) begin
      int ex, ey;
      ex = t % H_TOT; ey = (t / H_TOT) % V_TOT;
      // outputs now show the inputs of three clocks ago
      if (t >= 3) begin
        if (vga_rgb != e_rgb[(t-3)%4] || vga_hs != e_hs[(t-3)%4] || vga_vs != e_vs[(t-3)%4])
          bad++;
      end
      x = 10'(ex); y = 10'(ey);
      de = (ex < 640 && ey < 480);
      hs = !(ex >= 656 && ex < 752);
      vs = !(ey >= 490 && ey < 492);
      if (de) begin
        bits = font(mem[(ey/8)*80 + ex/8], 3'(ey % 8));
        e_rgb[t%4] = bits[7 - ex % 8] ? 3'b111 : 3'b000;
      end else e_rgb[t%4] = 3'b000;
      e_hs[t%4] = hs; e_vs[t%4] = vs;
      #1;
      if (rd_req && t < H_TOT * V_TOT) begin
        reads++;
        if (!de || ex % 8 != 0 || int'(rd_addr) != (ey/8)*80 + ex/8) bad_reads++;
      end else if (de && ex % 8 == 0 && t < H_TOT * V_TOT) bad_reads++;
      if (ex == H_TOT - 1) begin
        checks++;
        if (bad != 0) begin failures++; $display("FAIL: line %0d: %0d pixel mismatches", ey, bad); end
        bad = 0;
      end
      @(negedge clk);
    end
    checks++;
    if (reads != 80 * 480 || bad_reads != 0) begin
      failures++; $display("FAIL: %0d RAM reads, %0d misplaced", reads, bad_reads);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
