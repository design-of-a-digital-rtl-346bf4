// End-to-end testbench of fpga_top at its default size (80 x 60 characters,
// 640 x 480 raster). A mode-0 SPI master writes characters the way the
// microcontroller would: a sales line, digits sent as binary nibbles, lower
// case, a code with no glyph, and words addressed off the screen. The test
// then watches the VGA outputs alone: it finds the picture from the sync
// pulses (48 clocks after each hsync pulse, 29 lines after the vsync pulse),
// and compares every pixel of two whole frames with a screen model built from
// its own translation rule and the glyph image of font_pkg. The second batch
// of words is sent while a frame is being drawn. It counts how often each mechanism
// occurred (SPI words, writes, writes held back by a raster read, dropped
// words, unknown codes, MISO read-back) and fails any that never did.
module fpga_top_tb;
  localparam int HALF = 4;                  // SCK half period in clocks
  localparam string ORDER = " 0123456789ABCDEFGHIJKLMNOPQRSTUVWXYZ.,:$-+*/=#%()?!'\"<>_&@;";

  logic clk = 1'b0, rst_n = 1'b0;
  logic cs_n = 1'b1, sck = 1'b0, mosi = 1'b0, miso;
  logic hs, vs, upd_done, upd_unknown, upd_dropped;
  logic [2:0] rgb;

  int checks = 0, failures = 0;
  int n_words = 0, n_done = 0, n_stall = 0, n_drop = 0, n_unknown = 0, n_readback = 0;
  int n_frames_checked = 0;

  int scr [60][80];

  always #20 clk = ~clk;                    // 25 MHz pixel clock

  fpga_top dut (
    .clk, .rst_n, .spi_cs_n(cs_n), .spi_sck(sck), .spi_mosi(mosi), .spi_miso(miso),
    .vga_hsync_n(hs), .vga_vsync_n(vs), .vga_rgb(rgb),
    .upd_done, .upd_unknown, .upd_dropped
  );

  // event counters; the stall is observed inside the design
  always @(posedge clk) if (rst_n) begin
    if (upd_done) n_done++;
    if (upd_unknown) n_unknown++;
    if (upd_dropped) n_drop++;
    if (dut.wr_req && !dut.wr_grant) n_stall++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int glyph_of(input logic [7:0] c);
    byte ch;
    if (c < 8'h10) ch = (c < 8'h0A) ? byte'(8'h30 + c) : byte'(8'h41 + c - 8'h0A);
    else if (c >= "a" && c <= "z") ch = byte'(c - 8'h20);
    else ch = byte'(c);
    for (int i = 0; i < ORDER.len(); i++) if (ORDER[i] == ch) return i;
    return 63;
  endfunction

  // one SPI word {row, col, unused, code}; checks the read-back on MISO
  logic [31:0] last_word = '0;
  task automatic spi_word(input int row, input int col, input logic [7:0] code);
    logic [31:0] w, rx;
    w = {8'(row), 8'(col), 8'h00, code};
    rx = '0;
    cs_n = 1'b0;
    repeat (2*HALF) @(posedge clk);
    for (int i = 31; i >= 0; i--) begin
      mosi = w[i];
      repeat (HALF) @(posedge clk);
      sck = 1'b1; rx[i] = miso;
      repeat (HALF) @(posedge clk);
      sck = 1'b0;
    end
    repeat (2*HALF) @(posedge clk);
    cs_n = 1'b1;
    n_words++;
    if (rx == last_word) n_readback++;
    else begin failures++; $display("FAIL: MISO read-back %h expected %h", rx, last_word); end
    checks++;
    last_word = w;
    if (row < 60 && col < 80) scr[row][col] = glyph_of(code);
    repeat (2*HALF + $urandom_range(40)) @(posedge clk);
  endtask

  task automatic spi_string(input int row, input int col, input string s);
    for (int i = 0; i < s.len(); i++) spi_word(row, col + i, s[i]);
  endtask

  // pixel checker driven by the sync outputs alone
  logic hs_q = 1'b1, vs_q = 1'b1;
  int hcnt = 0, lines = -1, bad_px = 0, bad_blank = 0, frames_seen = 0;
  bit checking = 1'b0;
  always @(posedge clk) begin
    if (rst_n) begin
      if (vs && !vs_q) begin
        if (checking && lines >= 508) begin
          checks++;
          if (bad_px != 0 || bad_blank != 0) begin
            failures++;
            $display("FAIL: frame: %0d pixel mismatches, %0d lit blanking pixels", bad_px, bad_blank);
          end
          n_frames_checked++;
        end
        lines = 0; bad_px = 0; bad_blank = 0; frames_seen++;
      end
      if (hs && !hs_q) begin
        hcnt = 0;
        if (lines >= 0) lines++;
      end else hcnt++;
      if (lines >= 29 && lines < 509 && hcnt >= 48 && hcnt < 688) begin
        int v, h;
        logic [7:0] bits;
        v = lines - 29; h = hcnt - 48;
        bits = 8'(font_pkg::FONT[scr[v/8][h/8]] >> (8 * (7 - v % 8)));
        if (rgb != (bits[7 - h % 8] ? 3'b111 : 3'b000)) bad_px++;
      end else if (rgb != 3'b000) bad_blank++;
      hs_q <= hs; vs_q <= vs;
    end
  end

  initial begin
    repeat (4_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 60; r++) for (int c = 0; c < 80; c++) scr[r][c] = 0;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;

    // first batch, sent before the checked frames
    spi_string(0, 0, "CASH REGISTER");
    spi_string(2, 0, "MILK 1L");
    spi_string(2, 70, "$ 2.50");
    spi_string(3, 0, "bread x2");                 // lower case shows as upper case
    for (int i = 0; i < 16; i++) spi_word(5, 10 + i, 8'(i));   // binary nibbles 0..F
    spi_word(7, 3, 8'h7F);                         // no glyph: solid box
    spi_word(7, 4, 8'h00);
    spi_word(60, 0, "X");                          // off the screen: dropped
    spi_word(0, 80, "X");
    spi_string(59, 72, "TOTAL:");
    spi_word(59, 79, "#");
    check(n_done == n_words - 2, $sformatf("%0d updates for %0d words", n_done, n_words));

    // two whole frames must match the model
    checking = 1'b1;
    wait (n_frames_checked == 1);
    // second batch while the next frame is drawn: overwrite and add lines
    repeat (200000) @(posedge clk);
    checking = 1'b0;
    spi_string(0, 0, "cash register");
    for (int r = 10; r < 20; r++) spi_string(r, 5 * (r - 10), "12.34+5%=");
    spi_word(7, 3, " ");                           // clear the box
    wait (vs == 1'b0);
    checking = 1'b1;
    wait (n_frames_checked == 2);

    check(n_words > 0,           "SPI words were received");
    check(n_done > 0,            "updates were written");
    check(n_stall > 0,           "a write waited for a raster read");
    check(n_drop == 2,           $sformatf("off-screen words dropped: %0d", n_drop));
    check(n_unknown == 1,        $sformatf("unknown codes: %0d", n_unknown));
    check(n_readback == n_words, "MISO read-back of every word");
    $display("words=%0d updates=%0d stalls=%0d dropped=%0d unknown=%0d frames=%0d",
             n_words, n_done, n_stall, n_drop, n_unknown, n_frames_checked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
