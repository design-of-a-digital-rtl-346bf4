// Testbench of bin2ascii: every one of the 256 codes is looked up and the
// glyph compared with an independent model (position of the character in the
// glyph order string), including the nibble and lower-case rules. It also
// checks the one-clock latency and that the output holds while `en` is low.
module bin2ascii_tb;
  import vga_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [7:0] code = '0;
  logic [GLYPH_W-1:0] glyph;
  logic known;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  bin2ascii dut (.clk, .rst_n, .en, .code, .glyph, .known);

  localparam string ORDER = " 0123456789ABCDEFGHIJKLMNOPQRSTUVWXYZ.,:$-+*/=#%()?!'\"<>_&@;";

  function automatic int model(input logic [7:0] c);
    byte ch;
    if (c < 8'h10) ch = (c < 8'h0A) ? byte'(8'h30 + c) : byte'(8'h41 + c - 8'h0A);
    else if (c >= "a" && c <= "z") ch = byte'(c - 8'h20);
    else ch = byte'(c);
    for (int i = 0; i < ORDER.len(); i++) if (ORDER[i] == ch) return i;
    return -1;
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_g;
    logic [GLYPH_W-1:0] held;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 256; c++) begin
      @(negedge clk); code = 8'(c); en = 1'b1;
      @(negedge clk); en = 1'b0;
      exp_g = model(8'(c));
      checks++;
      if (exp_g < 0 ? (known || glyph != GLYPH_UNKNOWN)
                    : (!known || int'(glyph) != exp_g)) begin
        failures++;
        $display("FAIL: code %h glyph %0d known %b expected %0d", c, glyph, known, exp_g);
      end
      // hold with en low
      held = glyph;
      code = 8'(c + 1);
      @(negedge clk);
      checks++;
      if (glyph != held) begin failures++; $display("FAIL: output changed with en low"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
