// General control unit: the state machine that places each character update
// received from the microcontroller into the display RAM.
//
// States, in the order of the update sequence:
//   S_INIT      waits for an SPI event (a complete 32-bit word) and latches it;
//   S_ADDR_RAM  computes the RAM address row * TEXT_COLS + column; a word
//               whose row or column is off the screen is dropped here;
//   S_BIN2ASCII has the translation table look the code up (one clock);
//   S_READ_DATA requests the RAM port and writes the glyph into the memory
//               the raster reads, waiting while the raster holds the port;
//   S_VGA       returns the port to the raster and signals `done`; the new
//               character shows from the next refresh of its cell.
// `done` rises 5 clocks after the SPI event, 6 if the raster held the RAM
// port. That is far shorter than the transfer of one SPI word (at least 256
// clocks), so the next word always finds the machine back in S_INIT.
// `dropped` pulses for a word addressed off the screen. The state sequence
// follows the document; the word layout, address formula, drop rule and the
// one-clock states are this design's choices.
module ctrl_fsm
  import vga_pkg::*;
#(
  parameter int unsigned ADDR_W = $clog2(TEXT_COLS * TEXT_ROWS)
) (
  input  logic               clk,
  input  logic               rst_n,
  // SPI interface
  input  logic               frame_valid,
  input  spi_frame_t         frame,
  // translation table
  output logic               b2a_en,
  output logic [7:0]         b2a_code,
  input  logic [GLYPH_W-1:0] b2a_glyph,
  // display RAM port control
  output logic               wr_req,
  output logic [ADDR_W-1:0]  wr_addr,
  output logic [GLYPH_W-1:0] wr_data,
  input  logic               wr_grant,
  // status
  output ctrl_state_t        state,
  output logic               done,
  output logic               dropped
);

  spi_frame_t  word_q;
  ctrl_state_t next;

  always_comb begin
    next = state;
    unique case (state)
      S_INIT:      if (frame_valid) next = S_ADDR_RAM;
      S_ADDR_RAM:  next = (32'(word_q.row) < TEXT_ROWS && 32'(word_q.col) < TEXT_COLS)
                          ? S_BIN2ASCII : S_INIT;
      S_BIN2ASCII: next = S_READ_DATA;
      S_READ_DATA: if (wr_grant) next = S_VGA;
      S_VGA:       next = S_INIT;
      default:     next = S_INIT;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_INIT;
      word_q  <= '0;
      wr_addr <= '0;
      done    <= 1'b0;
      dropped <= 1'b0;
    end else begin
      state   <= next;
      done    <= (state == S_VGA);
      dropped <= (state == S_ADDR_RAM) && (next == S_INIT);
      if (state == S_INIT && frame_valid) word_q <= frame;
      if (state == S_ADDR_RAM)
        wr_addr <= ADDR_W'(32'(word_q.row) * TEXT_COLS + 32'(word_q.col));
    end
  end

  assign b2a_en   = (state == S_BIN2ASCII);
  assign b2a_code = word_q.code;
  assign wr_req   = (state == S_READ_DATA);
  assign wr_data  = b2a_glyph;

endmodule
