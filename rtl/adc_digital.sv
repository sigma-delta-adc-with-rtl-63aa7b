// adc_digital: the synthesizable digital part of the ADC chip: sampling
// clock, decimation filter, output register and the SPI slave with its mode
// register.
//
// Clocking: clk is the 1.28 MHz chip clock. fs_clk, a divide-by-2 of clk
// (640 kHz), is sent to the modulator's non-overlapping clock generator.
// The modulator's comparator decides shortly after fs_clk falls, so
// mod_bit is taken at the clk edge where fs_clk rises again, half a sample
// later, when it is settled. The filter chain sees one bit every two clk
// cycles.
//
// Output: each new 16-bit word from the decimator is copied to a holding
// register and drdy goes high. drdy falls when the DSP starts a frame
// (ss_n low). The holding register does not change while ss_n is low, so a
// frame always returns one whole word. A word that arrives during a frame
// waits and is taken when ss_n returns high. The DSP must leave at least
// three clk periods between ss_n falling and the first SCLK falling edge.
//
// Mode: the SPI slave holds the mode written by the DSP (SCLK domain);
// it is brought into the clk domain through two flip-flops and drives the
// decimator's mode multiplexer. After reset the mode is bio-electric.
//
// Source and choices: the 1.28 MHz clock, the 640 kHz sampling rate, the
// SPI link to a DSP master and the DSP-selected mode are the source
// design's. The clock division, the bit capture edge, the holding register,
// drdy, the three-clock select setup and the reset mode are this design's.
// spi_ss_n is used both by the SPI slave (as an asynchronous frame reset)
// and, through a two-flip-flop synchroniser, in the clk domain; a lint tool
// may flag this net as feeding both synchronous and asynchronous logic,
// which is intended here. The slave's received-word outputs are left open
// because only its mode register is used.
`timescale 1ns / 1ps

module adc_digital
  import adc_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  // modulator side
  output logic  fs_clk,
  input  logic  mod_bit,
  // SPI, CPOL = 1, CPHA = 1
  input  logic  spi_sclk,
  input  logic  spi_ss_n,
  input  logic  spi_mosi,
  output logic  spi_miso,
  output logic  spi_miso_oe,
  // status
  output logic  drdy,
  output mode_e mode
);

  logic        bit_valid, bit_q;
  logic        dec_valid;
  logic [15:0] dec_word;
  logic [15:0] hold_word, pend_word;
  logic        pend;
  logic [1:0]  ss_sync;
  logic [1:0]  mode_sync;
  mode_e       mode_spi;

  // 640 kHz sampling clock and bit capture.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fs_clk    <= 1'b0;
      bit_valid <= 1'b0;
      bit_q     <= 1'b0;
    end else begin
      fs_clk    <= ~fs_clk;
      bit_valid <= ~fs_clk;
      if (!fs_clk) bit_q <= mod_bit;
    end
  end

  // Mode and slave-select synchronisers.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode_sync <= '0;
      ss_sync   <= 2'b11;
    end else begin
      mode_sync <= {mode_sync[0], mode_spi};
      ss_sync   <= {ss_sync[0], spi_ss_n};
    end
  end
  assign mode = mode_e'(mode_sync[1]);

  decimation_filter u_dec (
    .clk, .rst_n, .mode,
    .bit_valid, .bit_in(bit_q),
    .out_valid(dec_valid), .out_word(dec_word)
  );

  // Output holding register, frozen during a frame.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hold_word <= '0;
      pend_word <= '0;
      pend      <= 1'b0;
      drdy      <= 1'b0;
    end else begin
      if (dec_valid) begin
        pend_word <= dec_word;
        pend      <= 1'b1;
      end
      if (!ss_sync[1] && !ss_sync[0]) begin
        drdy <= 1'b0;
      end else if (ss_sync[1] && ss_sync[0] && pend && !dec_valid) begin
        hold_word <= pend_word;
        pend      <= 1'b0;
        drdy      <= 1'b1;
      end
    end
  end

  spi_slave #(.WIDTH(16)) u_spi (
    .rst_n,
    .sclk(spi_sclk), .ss_n(spi_ss_n), .mosi(spi_mosi),
    .miso(spi_miso), .miso_oe(spi_miso_oe),
    .tx_word(hold_word), .rx_word(), .rx_toggle(),
    .mode_q(mode_spi)
  );

endmodule
