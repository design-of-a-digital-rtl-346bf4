// SPI slave that receives the 32-bit update words sent by the microcontroller.
//
// The link is a plain four-wire SPI: chip select active low, SCK idle low,
// MOSI sampled on the rising SCK edge and MISO changed on the falling edge
// (mode 0), most significant bit first. A transfer is FRAME_W bits long, as in
// the link's waveform (bits 31, 30, 29, ...). While a word is shifted in, MISO
// shifts out the previous word received, so the master can read back what the
// FPGA took. MISO is driven low while the slave is not selected.
//
// The three SPI inputs are brought into the system clock domain with two
// flip-flops each and their edges detected there, so SCK must be slow
// against the system clock: clk/8 is the fastest rate verified. When the
// last bit has been taken, `frame` holds the word and `frame_valid` is high
// for one clock (the "SPI event" of the control unit). A transfer cut short
// by chip select going high is discarded. Word length, bit order and the
// echo of the previous word follow the link's waveform; the SPI mode, the
// select polarity and the oversampling scheme are this design's choices.
module spi_slave #(
  parameter int unsigned FRAME_W = vga_pkg::SPI_FRAME_W
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               spi_cs_n,
  input  logic               spi_sck,
  input  logic               spi_mosi,
  output logic               spi_miso,
  output logic [FRAME_W-1:0] frame,
  output logic               frame_valid
);

  localparam int unsigned CNT_W = $clog2(FRAME_W + 1);

  logic [2:0] cs_sync, sck_sync;
  logic [1:0] mosi_sync;
  logic       cs_act, sck_rise, sck_fall, cs_start;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cs_sync   <= '1;
      sck_sync  <= '0;
      mosi_sync <= '0;
    end else begin
      cs_sync   <= {cs_sync[1:0], spi_cs_n};
      sck_sync  <= {sck_sync[1:0], spi_sck};
      mosi_sync <= {mosi_sync[0], spi_mosi};
    end
  end

  assign cs_act   = !cs_sync[1];
  assign cs_start = cs_sync[2] && !cs_sync[1];
  assign sck_rise = cs_act && !sck_sync[2] &&  sck_sync[1];
  assign sck_fall = cs_act &&  sck_sync[2] && !sck_sync[1];

  logic [FRAME_W-1:0] rx_sr, tx_sr;
  logic [CNT_W-1:0]   bit_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_sr       <= '0;
      tx_sr       <= '0;
      bit_cnt     <= '0;
      frame       <= '0;
      frame_valid <= 1'b0;
    end else begin
      frame_valid <= 1'b0;
      if (!cs_act) begin
        bit_cnt <= '0;
      end else if (cs_start) begin
        bit_cnt <= '0;
        tx_sr   <= frame;                       // read-back of the last word
      end else begin
        if (sck_rise) begin
          rx_sr <= {rx_sr[FRAME_W-2:0], mosi_sync[1]};
          if (bit_cnt == CNT_W'(FRAME_W - 1)) begin
            frame       <= {rx_sr[FRAME_W-2:0], mosi_sync[1]};
            frame_valid <= 1'b1;
            bit_cnt     <= '0;
          end else begin
            bit_cnt <= bit_cnt + 1'b1;
          end
        end
        if (sck_fall) tx_sr <= {tx_sr[FRAME_W-2:0], 1'b0};
      end
    end
  end

  assign spi_miso = cs_act ? tx_sr[FRAME_W-1] : 1'b0;

endmodule
