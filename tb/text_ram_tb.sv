// Testbench of text_ram: checks the blank start, then runs random writes and
// reads against a model array, checking the one-clock read latency, that a
// write does not disturb `rdata`, and that nothing changes while `en` is low.
module text_ram_tb;
  import vga_pkg::*;
  localparam int unsigned DEPTH = TEXT_COLS * TEXT_ROWS;
  localparam int unsigned AW = $clog2(DEPTH);

  logic clk = 1'b0, en = 1'b0, we = 1'b0;
  logic [AW-1:0] addr = '0;
  logic [GLYPH_W-1:0] wdata = '0, rdata;
  logic [GLYPH_W-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  text_ram dut (.clk, .en, .we, .addr, .wdata, .rdata);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [GLYPH_W-1:0] held;
    for (int i = 0; i < int'(DEPTH); i++) model[i] = '0;
    // blank start: sample some cells
    for (int i = 0; i < int'(DEPTH); i += 97) begin
      @(negedge clk); en = 1'b1; we = 1'b0; addr = AW'(i);
      @(negedge clk); en = 1'b0;
      checks++;
      if (rdata != 0) begin failures++; $display("FAIL: cell %0d not blank", i); end
    end
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      en = 1'b1;
      addr = AW'($urandom_range(DEPTH - 1));
      if (n < 100) addr = AW'(n);             // a dense block for readback
      we = ($urandom_range(1) == 1);
      wdata = GLYPH_W'($urandom());
      held = rdata;
      if (we) begin
        model[addr] = wdata;
        @(negedge clk);
        checks++;
        if (rdata != held) begin failures++; $display("FAIL: write changed rdata"); end
      end else begin
        @(negedge clk);
        checks++;
        if (rdata != model[addr]) begin
          failures++; $display("FAIL: read %0d = %0d expected %0d", addr, rdata, model[addr]);
        end
      end
      // a clock with en low changes nothing
      en = 1'b0; we = 1'b1; wdata = ~wdata; held = rdata;
      @(negedge clk);
      checks++;
      if (rdata != held) begin failures++; $display("FAIL: rdata changed with en low"); end
    end
    for (int i = 0; i < 100; i++) begin
      @(negedge clk); en = 1'b1; we = 1'b0; addr = AW'(i);
      @(negedge clk); en = 1'b0;
      checks++;
      if (rdata != model[i]) begin failures++; $display("FAIL: final read %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
