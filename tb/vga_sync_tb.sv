// Testbench of vga_sync at its default 640 x 480 timing: over two frames it
// checks, clock by clock, that x runs 0..799 and y 0..520, that hsync is low
// exactly for x in [656, 752), vsync exactly for y in [490, 492), that the
// display enable covers the 640 x 480 picture, and that frame_start comes
// once every 800 * 521 clocks.
module vga_sync_tb;
  localparam int H_TOT = 800, V_TOT = 521;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [9:0] x, y;
  logic hsync_n, vsync_n, de, frame_start;
  int checks = 0, failures = 0;

  always #20 clk = ~clk;

  vga_sync dut (.clk, .rst_n, .x, .y, .hsync_n, .vsync_n, .de, .frame_start);

  initial begin
    repeat (3 * H_TOT * V_TOT) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ex, ey, bad, last_fs, n_fs, de_cnt;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // outputs are registered: the first clock after reset shows (0, 0)
    @(negedge clk);
    ex = 0; ey = 0; bad = 0; last_fs = -1; n_fs = 0; de_cnt = 0;
    for (int t = 0; t < 2 * H_TOT * V_TOT; t++) begin
      if (int'(x) != ex || int'(y) != ey) bad++;
      if (hsync_n != !(ex >= 656 && ex < 752)) bad++;
      if (vsync_n != !(ey >= 490 && ey < 492)) bad++;
      if (de != (ex < 640 && ey < 480)) bad++;
      if (de) de_cnt++;
      if (frame_start) begin
        checks++;
        if (ex != 0 || ey != 0 || (last_fs >= 0 && t - last_fs != H_TOT * V_TOT)) begin
          failures++; $display("FAIL: frame_start at t=%0d", t);
        end
        last_fs = t; n_fs++;
      end
      if (ex == H_TOT - 1) begin
        checks++;
        if (bad != 0) begin failures++; $display("FAIL: line %0d: %0d mismatches", ey, bad); end
        bad = 0;
        ex = 0;
        ey = (ey == V_TOT - 1) ? 0 : ey + 1;
      end else ex++;
      @(negedge clk);
    end
    checks++;
    if (n_fs != 2) begin failures++; $display("FAIL: %0d frame_start pulses", n_fs); end
    checks++;
    if (de_cnt != 2 * 640 * 480) begin failures++; $display("FAIL: de count %0d", de_cnt); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
