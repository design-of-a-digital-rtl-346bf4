// Testbench of char_rom: reads the rows of several glyphs and compares them
// with the expected 5 x 7 dot patterns written out here, checks the one-clock
// read latency, that the output holds while `en` is low, that every glyph
// leaves its right-hand column and bottom row empty except the box, and
// that unused glyphs are blank.
module char_rom_tb;
  import vga_pkg::*;

  logic clk = 1'b0, en = 1'b0;
  logic [GLYPH_W-1:0] glyph = '0;
  logic [2:0] row = '0;
  logic [7:0] bits;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  char_rom dut (.clk, .en, .glyph, .row, .row_bits(bits));

  task automatic rd(input int g, input int r, output logic [7:0] v);
    @(negedge clk); glyph = GLYPH_W'(g); row = 3'(r); en = 1'b1;
    @(negedge clk); en = 1'b0; v = bits;
  endtask

  task automatic expect_glyph(input int g, input logic [7:0] exp_rows [8]);
    logic [7:0] v;
    for (int r = 0; r < 8; r++) begin
      rd(g, r, v);
      checks++;
      if (v != exp_rows[r]) begin
        failures++; $display("FAIL: glyph %0d row %0d = %h expected %h", g, r, v, exp_rows[r]);
      end
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] v, held;
    // '0' (glyph 1): .###. #...# #..## #.#.# ##..# #...# .###.
    expect_glyph(1,  '{8'h38, 8'h44, 8'h4C, 8'h54, 8'h64, 8'h44, 8'h38, 8'h00});
    // 'A' (glyph 11)
    expect_glyph(11, '{8'h38, 8'h44, 8'h44, 8'h7C, 8'h44, 8'h44, 8'h44, 8'h00});
    // 'T' (glyph 30)
    expect_glyph(30, '{8'h7C, 8'h10, 8'h10, 8'h10, 8'h10, 8'h10, 8'h10, 8'h00});
    // '$' (glyph 40)
    expect_glyph(40, '{8'h10, 8'h3C, 8'h50, 8'h38, 8'h14, 8'h78, 8'h10, 8'h00});
    // space and the unknown-code box
    expect_glyph(0,  '{8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00});
    expect_glyph(63, '{8'hFE, 8'hFE, 8'hFE, 8'hFE, 8'hFE, 8'hFE, 8'hFE, 8'h00});
    // every used glyph: rightmost column and bottom row empty, some pixel set
    for (int g = 1; g < 60; g++) begin
      logic [7:0] any;
      any = '0;
      for (int r = 0; r < 8; r++) begin
        rd(g, r, v);
        any |= v;
        checks++;
        if (v[0] || (r == 7 && v != 0)) begin
          failures++; $display("FAIL: glyph %0d row %0d margin %h", g, r, v);
        end
      end
      checks++;
      if (any == 0) begin failures++; $display("FAIL: glyph %0d empty", g); end
    end
    for (int g = 60; g < 63; g++)
      for (int r = 0; r < 8; r++) begin
        rd(g, r, v);
        checks++;
        if (v != 0) begin failures++; $display("FAIL: unused glyph %0d not blank", g); end
      end
    // hold while en is low
    rd(11, 3, held);
    @(negedge clk); glyph = 6'd1; row = 3'd0;
    @(negedge clk);
    checks++;
    if (bits != held) begin failures++; $display("FAIL: output changed with en low"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
