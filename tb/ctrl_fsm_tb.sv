// Testbench of ctrl_fsm: sends update words (on and off the screen) with a
// registered stand-in for the translation table and a RAM port that refuses
// writes at random. Checks the state sequence init, Addr_RAM, bin2ascii,
// Read_Data, VGA, the address and glyph of each write, the `done` latency
// (5 clocks plus one per refused write cycle) and the drop of off-screen words.
module ctrl_fsm_tb;
  import vga_pkg::*;
  localparam int AW = $clog2(TEXT_COLS * TEXT_ROWS);

  logic clk = 1'b0, rst_n = 1'b0;
  logic frame_valid = 1'b0;
  spi_frame_t frame = '0;
  logic b2a_en, wr_req, wr_grant, done, dropped;
  logic [7:0] b2a_code;
  logic [GLYPH_W-1:0] b2a_glyph, wr_data;
  logic [AW-1:0] wr_addr;
  ctrl_state_t state;
  logic refuse = 1'b0;
  int checks = 0, failures = 0;
  int writes = 0, stalls = 0, drops = 0, dones = 0;
  logic [AW-1:0] last_addr;
  logic [GLYPH_W-1:0] last_data;

  always #5 clk = ~clk;

  ctrl_fsm dut (
    .clk, .rst_n, .frame_valid, .frame, .b2a_en, .b2a_code, .b2a_glyph,
    .wr_req, .wr_addr, .wr_data, .wr_grant, .state, .done, .dropped
  );

  // stand-in for the translation table: registered, one clock
  always_ff @(posedge clk) if (b2a_en) b2a_glyph <= GLYPH_W'(b2a_code ^ 8'h2A);

  assign wr_grant = wr_req && !refuse;

  always @(posedge clk) begin
    if (wr_req && wr_grant) begin writes++; last_addr = wr_addr; last_data = wr_data; end
    if (wr_req && !wr_grant) stalls++;
    if (done) dones++;
    if (dropped) drops++;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    b2a_glyph = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 300; n++) begin
      int row, col, lat, nstall, w0, d0, s0;
      logic [7:0] code;
      bit done_seen;
      bit onscreen;
      ctrl_state_t seq [$];
      seq.delete();
      row = (n % 10 == 9) ? 60 + $urandom_range(195) : $urandom_range(59);
      col = (n % 10 == 4) ? 80 + $urandom_range(175) : $urandom_range(79);
      onscreen = (row < 60 && col < 80);
      w0 = writes; d0 = drops; s0 = stalls;
      @(negedge clk);
      check(state == S_INIT, "idle in init");
      code = 8'($urandom());
      frame = '{row: 8'(row), col: 8'(col), rsvd: 8'($urandom()), code: code};
      frame_valid = 1'b1;
      @(negedge clk);
      frame_valid = 1'b0;
      frame = '0;                              // the word must have been latched
      lat = 1;
      while (!done && lat < 40) begin
        if (seq.size() == 0 || seq[$] != state) seq.push_back(state);
        refuse = (state == S_READ_DATA) && ($urandom_range(2) == 0);
        @(negedge clk);
        lat++;
        if (dropped) break;
      end
      refuse = 1'b0;
      done_seen = done;
      @(posedge clk);                          // let the event counters sample
      @(negedge clk);
      nstall = stalls - s0;
      if (onscreen) begin
        check(seq.size() == 4 && seq[0] == S_ADDR_RAM && seq[1] == S_BIN2ASCII
              && seq[2] == S_READ_DATA && seq[3] == S_VGA,
              $sformatf("state sequence %p", seq));
        check(done_seen && lat == 5 + nstall, $sformatf("done latency %0d with %0d stalls", lat, nstall));
        check(writes == w0 + 1, "one write");
        check(int'(last_addr) == row * 80 + col, $sformatf("address %0d for (%0d,%0d)", last_addr, row, col));
        check(last_data == GLYPH_W'(code ^ 8'h2A), "glyph written");
      end else begin
        check(drops == d0 + 1 && writes == w0, $sformatf("off-screen (%0d,%0d) dropped", row, col));
      end
      repeat ($urandom_range(3)) @(negedge clk);
    end
    check(stalls > 0, "a refused write was seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
