// Testbench of spi_slave: a mode-0 SPI master sends random 32-bit words with
// SCK at clk/8 and checks that each word appears on `frame` with exactly one
// `frame_valid` pulse, that MISO returns the previous word bit by bit, and
// that a transfer cut short by chip select does not produce a word.
module spi_slave_tb;
  localparam int unsigned W = 32;
  localparam int unsigned HALF = 4;     // SCK half period in clocks

  logic clk = 1'b0, rst_n = 1'b0;
  logic cs_n = 1'b1, sck = 1'b0, mosi = 1'b0;
  logic miso, frame_valid;
  logic [W-1:0] frame;
  int checks = 0, failures = 0, valid_pulses = 0;

  always #5 clk = ~clk;

  spi_slave dut (
    .clk, .rst_n, .spi_cs_n(cs_n), .spi_sck(sck), .spi_mosi(mosi),
    .spi_miso(miso), .frame, .frame_valid
  );

  always @(posedge clk) if (frame_valid) valid_pulses++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic xfer(input logic [W-1:0] tx, input int nbits, output logic [W-1:0] rx);
    rx = '0;
    cs_n = 1'b0;
    repeat (2*HALF) @(posedge clk);
    for (int i = int'(W) - 1; i >= int'(W) - nbits; i--) begin
      mosi = tx[i];
      repeat (HALF) @(posedge clk);
      sck = 1'b1;
      rx[i] = miso;
      repeat (HALF) @(posedge clk);
      sck = 1'b0;
    end
    repeat (2*HALF) @(posedge clk);
    cs_n = 1'b1;
    repeat (2*HALF) @(posedge clk);
  endtask

  initial begin
    repeat (2000 * 40) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] word, prev, rx;
    int n_before;
    prev = '0;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 30; n++) begin
      word = $urandom();
      n_before = valid_pulses;
      xfer(word, W, rx);
      check(valid_pulses == n_before + 1, "one frame_valid per word");
      check(frame == word, $sformatf("frame %h expected %h", frame, word));
      check(rx == prev, $sformatf("miso read-back %h expected %h", rx, prev));
      prev = word;
      if (n == 10) begin
        n_before = valid_pulses;
        xfer(~word, 20, rx);                  // aborted transfer
        check(valid_pulses == n_before, "aborted transfer gives no word");
        check(frame == word, "aborted transfer keeps the last word");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
