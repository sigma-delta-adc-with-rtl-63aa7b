// sin_comp: sine compensator, four cascaded sections (-1 + 6z^-1 - z^-2)/4,
// followed by decimation by 2.
//
// The cascade is one 9-tap filter with taps
//   1 -24 220 -936 1734 -936 220 -24 1   (sum 256)
// taken from the expansion of (-1 + 6z^-1 - z^-2)^4 in adc_pkg. It runs at
// one eighth of the modulator rate, so one delay here is the z^-8 of the
// modulator-rate description. Its gain rises from 1 at DC to 2 at its
// Nyquist frequency, which flattens the droop of the CIC pass band.
// The products are constant multiplications, which synthesis turns into
// shifts and adds (936 = 2^9+2^8+2^7+2^5+2^3). The sum is rounded to
// nearest on the division by 256 and saturated to a sample.
//
// Interface: in_valid/in_data at the input rate; out_valid pulses for one
// clock on every second input, one clock after it.
`timescale 1ns / 1ps

module sin_comp
  import adc_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  sample_t in_data,
  output logic    out_valid,
  output sample_t out_data
);

  localparam int NT = SIN_TAPS;
  localparam int AW = SAMPLE_W + 14;

  sample_t hist [NT-1];   // hist[k] = x(n-1-k)
  logic    phase;
  logic signed [AW-1:0] acc;

  always_comb begin
    acc = AW'(in_data) * AW'(sin_coef(0));
    for (int k = 1; k < NT; k++)
      acc += AW'(hist[k-1]) * AW'(sin_coef(k));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < NT - 1; k++) hist[k] <= '0;
      phase     <= 1'b0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        hist[0] <= in_data;
        for (int k = 1; k < NT - 1; k++) hist[k] <= hist[k-1];
        phase <= ~phase;
        if (phase) begin
          out_valid <= 1'b1;
          out_data  <= sat_sample((48'(acc) + (48'sd1 <<< (SIN_FRAC - 1))) >>> SIN_FRAC);
        end
      end
    end
  end

endmodule
