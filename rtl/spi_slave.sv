// spi_slave: SPI slave port of the ADC, clock polarity 1 and clock phase 1
// (SPI mode 3), 16-bit frames, most significant bit first.
//
// The DSP is the master. SCLK idles high. While ss_n is low the slave
// changes MISO on each falling SCLK edge, the first bit included (not on
// the falling edge of ss_n), and the master samples it on the next rising
// edge; MOSI is sampled by the slave on rising edges. The shift logic runs
// on SCLK itself, so the SCLK rate is independent of the ADC clock.
//
// Transmit: at the first falling edge of a frame the word on tx_word is
// loaded; the system side must keep tx_word stable while ss_n is low.
// Receive: after the 16th rising edge the received word is copied to
// rx_word and rx_toggle flips. A received word with bit 15 set is a mode
// write: bit 0 becomes the new mode (0 bio-electric, 1 bio-image), held in
// mode_q (SCLK domain; the system side synchronises it). Words with bit 15
// clear are plain reads. miso_oe is high while selected, so MISO can share
// a bus with other slaves.
//
// Source and choices: mode 3 and data changing on SCLK (not on ss_n) follow
// the source design. The 16-bit frame, MSB first, and the mode-write
// command are this design's choices.
`timescale 1ns / 1ps

module spi_slave
  import adc_pkg::*;
#(
  parameter int WIDTH = 16
) (
  input  logic             rst_n,
  input  logic             sclk,
  input  logic             ss_n,
  input  logic             mosi,
  output logic             miso,
  output logic             miso_oe,
  input  logic [WIDTH-1:0] tx_word,
  output logic [WIDTH-1:0] rx_word,
  output logic             rx_toggle,
  output mode_e            mode_q
);

  localparam int CW = $clog2(WIDTH + 1);

  logic [CW-1:0]    tx_cnt, rx_cnt;
  logic [WIDTH-1:0] tx_sh;
  logic [WIDTH-2:0] rx_sh;
  logic [WIDTH-1:0] rx_next;

  // Frame reset: held while deselected or in reset, one asynchronous
  // clear for the shift registers and bit counters.
  logic frame_rst_n;
  assign frame_rst_n = rst_n & ~ss_n;

  assign miso_oe = ~ss_n;
  assign rx_next = {rx_sh, mosi};

  // Transmit side: falling edges; cleared by reset and while deselected.
  always_ff @(negedge sclk or negedge frame_rst_n) begin
    if (!frame_rst_n) begin
      tx_cnt <= '0;
      tx_sh  <= '0;
      miso   <= 1'b0;
    end else if (tx_cnt == '0) begin
      miso   <= tx_word[WIDTH-1];
      tx_sh  <= {tx_word[WIDTH-2:0], 1'b0};
      tx_cnt <= CW'(1);
    end else begin
      miso   <= tx_sh[WIDTH-1];
      tx_sh  <= {tx_sh[WIDTH-2:0], 1'b0};
      if (tx_cnt != CW'(WIDTH)) tx_cnt <= tx_cnt + 1'b1;
    end
  end

  // Receive side: rising edges.
  always_ff @(posedge sclk or negedge frame_rst_n) begin
    if (!frame_rst_n) begin
      rx_cnt <= '0;
      rx_sh  <= '0;
    end else begin
      rx_sh <= rx_next[WIDTH-2:0];
      if (rx_cnt == CW'(WIDTH - 1)) rx_cnt <= '0;
      else                          rx_cnt <= rx_cnt + 1'b1;
    end
  end

  always_ff @(posedge sclk or negedge rst_n) begin
    if (!rst_n) begin
      rx_word   <= '0;
      rx_toggle <= 1'b0;
      mode_q    <= MODE_BIO_ELECTRIC;
    end else if (rx_cnt == CW'(WIDTH - 1)) begin
      rx_word   <= rx_next;
      rx_toggle <= ~rx_toggle;
      if (rx_next[WIDTH-1]) mode_q <= mode_e'(rx_next[0]);
    end
  end

endmodule
