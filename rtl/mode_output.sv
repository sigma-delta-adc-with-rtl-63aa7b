// mode_output: last stage of the decimator. A 2-to-1 multiplexer, steered
// by the mode, picks the decimator tap for the selected bandwidth and the
// sample is quantised to that mode's resolution.
//
//   bio-electric mode: 4th half-band output, 2.5 kHz, OSR 256, 10-bit code
//   bio-image mode:    1st half-band output, 20 kHz,  OSR 32,   8-bit code
//
// The code is offset binary: 0 is -VREF, 2^(B-1) is zero input, and
// 2^B - 1 is the largest positive input. It is the full-scale sample
// (+/-2^16 = +/-VREF) shifted right by 17-B with rounding, plus 2^(B-1),
// clipped to 0 .. 2^B-1.
//
// Output word (16 bits), as sent over SPI:
//   [15] mode, [14:10] zero, [9:0] code (8-bit codes use [7:0], [9:8] = 0).
// out_valid pulses for one clock, one clock after the selected input.
//
// Source and choices: the 2-to-1 mode multiplexer as the last stage, the
// tap points (20 kHz and 2.5 kHz) and the 10/8-bit resolutions follow the
// source design. The offset-binary code, the rounding and the word layout
// are this design's choices.
`timescale 1ns / 1ps

module mode_output
  import adc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  mode_e       mode,
  input  logic        elec_valid,
  input  sample_t     elec_data,
  input  logic        img_valid,
  input  sample_t     img_data,
  output logic        out_valid,
  output logic [15:0] out_word
);

  localparam int FS_BITS = 17;   // +/-2^16 spans 2^17 codes of one unit

  logic    sel_valid;
  sample_t sel_data;
  logic [9:0] code;

  assign sel_valid = (mode == MODE_BIO_IMAGE) ? img_valid : elec_valid;
  assign sel_data  = (mode == MODE_BIO_IMAGE) ? img_data  : elec_data;

  function automatic logic [9:0] quantise(sample_t s, int bits);
    logic signed [SAMPLE_W+1:0] r;
    logic signed [SAMPLE_W+1:0] top;
    int sh;
    sh  = FS_BITS - bits;
    r   = ((SAMPLE_W + 2)'(s) + ((SAMPLE_W + 2)'(1) <<< (sh - 1))) >>> sh;
    r   = r + ((SAMPLE_W + 2)'(1) <<< (bits - 1));
    top = ((SAMPLE_W + 2)'(1) <<< bits) - 1;
    if (r < 0)   r = '0;
    if (r > top) r = top;
    return r[9:0];
  endfunction

  assign code = (mode == MODE_BIO_IMAGE) ? quantise(sel_data, 8)
                                         : quantise(sel_data, 10);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_word  <= '0;
    end else begin
      out_valid <= sel_valid;
      if (sel_valid) out_word <= {mode, 5'b0, code};
    end
  end

endmodule
