// decimation_filter: the seven-stage decimator that turns the 640 kHz
// one-bit modulator stream into 20 kHz (bio-image) or 2.5 kHz
// (bio-electric) samples.
//
//   1-bit, 640 kHz
//     -> cic_filter   sinc^4, R = 16, evaluated every 4 bits    -> 160 kHz
//     -> offset to signed: 2 * (value - 2^15), full scale +/-2^16
//     -> cos_comp     ((1+z^-4)/2)^3 in modulator-rate terms, /2 -> 80 kHz
//     -> sin_comp     ((-1+6z^-8-z^-16)/4)^4, /2                 -> 40 kHz
//     -> hb1 (31 taps) /2 -> 20 kHz  -- bio-image output
//     -> hb2 (15 taps) /2 -> 10 kHz
//     -> hb3 (15 taps) /2 ->  5 kHz
//     -> hb4 (23 taps) /2 -> 2.5 kHz -- bio-electric output
//     -> mode_output: 2-to-1 mode multiplexer and quantiser
//
// The CIC alone decimates by 16 in the overall response; its last factor
// of 4 is shared out over the compensators so that their one-sample
// delays equal the z^-4 and z^-8 of their transfer functions. By the noble
// identities this gives the same output as running CIC, cosine and sine
// filters at 640 kHz and dropping 15 of every 16 samples.
// In bio-image mode the 2nd to 4th half-band stages receive no input and
// hold still, which saves their switching power.
//
// Interface: bit_valid/bit_in, one bit per valid; out_valid pulses with a
// new 16-bit output word (see mode_output). The mode may change at any
// time; the first output after a change can mix both settings' history.
//
// Source and choices: the stage list, the transfer functions and the two
// output taps follow the source design; the spreading of the comb filter's
// last decimation over the compensators, their order (cosine first) and
// the 18-bit sample width are this design's choices.
`timescale 1ns / 1ps

module decimation_filter
  import adc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  mode_e       mode,
  input  logic        bit_valid,
  input  logic        bit_in,
  output logic        out_valid,
  output logic [15:0] out_word
);

  logic             cic_v;
  logic [CIC_W-1:0] cic_d;
  sample_t          cic_s;
  logic             cos_v, sin_v, hb1_v, hb2_v, hb3_v, hb4_v;
  sample_t          cos_d, sin_d, hb1_d, hb2_d, hb3_d, hb4_d;
  logic             hb2_in_v;

  cic_filter #(.DEC(CIC_R / 4)) u_cic (
    .clk, .rst_n, .bit_valid, .bit_in,
    .out_valid(cic_v), .out_data(cic_d)
  );

  // 0 .. 2^16 -> -2^16 .. +2^16 (times 2, to the common sample scale)
  assign cic_s = (sample_t'({1'b0, cic_d}) - sample_t'(CIC_MID)) <<< 1;

  cos_comp u_cos (
    .clk, .rst_n, .in_valid(cic_v), .in_data(cic_s),
    .out_valid(cos_v), .out_data(cos_d)
  );

  sin_comp u_sin (
    .clk, .rst_n, .in_valid(cos_v), .in_data(cos_d),
    .out_valid(sin_v), .out_data(sin_d)
  );

  hb_decim #(.STAGE(1)) u_hb1 (
    .clk, .rst_n, .in_valid(sin_v), .in_data(sin_d),
    .out_valid(hb1_v), .out_data(hb1_d)
  );

  assign hb2_in_v = hb1_v && (mode == MODE_BIO_ELECTRIC);

  hb_decim #(.STAGE(2)) u_hb2 (
    .clk, .rst_n, .in_valid(hb2_in_v), .in_data(hb1_d),
    .out_valid(hb2_v), .out_data(hb2_d)
  );

  hb_decim #(.STAGE(3)) u_hb3 (
    .clk, .rst_n, .in_valid(hb2_v), .in_data(hb2_d),
    .out_valid(hb3_v), .out_data(hb3_d)
  );

  hb_decim #(.STAGE(4)) u_hb4 (
    .clk, .rst_n, .in_valid(hb3_v), .in_data(hb3_d),
    .out_valid(hb4_v), .out_data(hb4_d)
  );

  mode_output u_out (
    .clk, .rst_n, .mode,
    .elec_valid(hb4_v), .elec_data(hb4_d),
    .img_valid(hb1_v),  .img_data(hb1_d),
    .out_valid, .out_word
  );

endmodule
