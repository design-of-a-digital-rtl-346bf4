// Full-screen testbench of fpga_top at its default size: the SPI master
// writes every one of the 80 x 60 character cells (4800 words, the whole
// display RAM), cycling through all printable ASCII codes, then the test
// compares every pixel of a whole frame, recovered from the sync outputs
// alone, with its own screen model. It shows that the display memory holds
// a complete screen and that every cell address, first to last, reaches the
// right place on the monitor.
module screen_fill_tb;
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
    repeat (2*HALF) @(posedge clk);
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
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 60; r++) for (int c = 0; c < 80; c++) scr[r][c] = 0;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;

    for (int r = 0; r < 60; r++)
      for (int c = 0; c < 80; c++)
        spi_word(r, c, 8'(8'h20 + (r * 80 + c) % 95));
    checking = 1'b1;
    wait (n_frames_checked == 1);
    check(n_done == 4800, $sformatf("%0d updates for 4800 cells", n_done));
    check(n_drop == 0,           $sformatf("words dropped: %0d", n_drop));
    check(n_readback == n_words, "MISO read-back of every word");
    $display("words=%0d updates=%0d stalls=%0d dropped=%0d unknown=%0d frames=%0d",
             n_words, n_done, n_stall, n_drop, n_unknown, n_frames_checked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
