// sigma_delta_adc: the complete two-mode sigma-delta ADC for biomedical
// signals, from analog input to SPI output.
//
// One converter serves two kinds of channel, chosen by the DSP over SPI:
//   bio-electric (EEG/ECG/EOG/EMG): 1.25 kHz band, OSR 256, 2.5 kHz words,
//                                   10-bit codes
//   bio-image (fNIR):               10 kHz band, OSR 32, 20 kHz words,
//                                   8-bit codes
// Both modes share the modulator running at 640 kHz (clk / 2) and the
// first decimation stages; only the point where the decimator output is
// taken changes.
//
//   vin -> sd_modulator (2nd order, 1 bit) -> adc_digital
//            ^ p1/p2/p1d/p2d                 |-> decimation_filter
//   nonoverlap_clkgen <- fs_clk (640 kHz) ---|-> output register, drdy
//                                            |-> spi_slave (mode 3)
//
// The modulator and the clock generator are behavioural models of analog
// circuits (real-valued input, gate delays); adc_digital is the
// synthesizable part. Input full scale is +/-VREF = +/-0.75 V.
`timescale 1ns / 1ps

module sigma_delta_adc
  import adc_pkg::*;
#(
  parameter real VREF = 0.75
) (
  input  logic  clk,          // 1.28 MHz
  input  logic  rst_n,
  input  real   vin,          // differential input (V)
  input  logic  spi_sclk,
  input  logic  spi_ss_n,
  input  logic  spi_mosi,
  output logic  spi_miso,
  output logic  spi_miso_oe,
  output logic  drdy,
  output mode_e mode
);

  logic fs_clk, mod_bit;
  logic p1, p1_b, p1d, p1d_b, p2, p2_b, p2d, p2d_b;

  nonoverlap_clkgen u_clkgen (
    .clk(fs_clk),
    .p1, .p1_b, .p1d, .p1d_b, .p2, .p2_b, .p2d, .p2d_b
  );

  sd_modulator #(.VREF(VREF)) u_mod (
    .vin, .rst_n, .p1, .p1d, .p2, .p2d, .y(mod_bit)
  );

  adc_digital u_dig (
    .clk, .rst_n,
    .fs_clk, .mod_bit,
    .spi_sclk, .spi_ss_n, .spi_mosi, .spi_miso, .spi_miso_oe,
    .drdy, .mode
  );

  // The complementary phases drive switches of the real circuit only.
  wire unused_bar = p1_b ^ p1d_b ^ p2_b ^ p2d_b;

endmodule
