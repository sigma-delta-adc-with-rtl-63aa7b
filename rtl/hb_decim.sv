// hb_decim: half-band low-pass filter with decimation by 2, one of the four
// stages that follow the CIC and its compensators.
//
// STAGE selects the coefficient set from adc_pkg:
//   1: 31 taps (16 non-zero), coefficients over 2^14, input rate 40 kHz
//   2, 3: 15 taps (9 non-zero), coefficients over 2^10, 20 / 10 kHz
//   4: 23 taps (13 non-zero), coefficients over 2^12, 5 kHz
// The filter is a direct-form FIR. Symmetric taps are added before they are
// multiplied, and the zero taps of the half-band response are skipped at
// elaboration, so only the non-zero coefficients cost logic. Constant
// multiplications become shifts and adds in synthesis. The sum is rounded
// to nearest and saturated to a sample.
//
// Interface: in_valid/in_data at the input rate. On every second valid
// input the output over the newest NT inputs (including that one) is
// registered on out_data and out_valid pulses for one clock.
`timescale 1ns / 1ps

module hb_decim
  import adc_pkg::*;
#(
  parameter int STAGE = 1
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  sample_t in_data,
  output logic    out_valid,
  output sample_t out_data
);

  localparam int NT   = hb_taps(STAGE);
  localparam int FR   = hb_frac(STAGE);
  localparam int AW   = SAMPLE_W + 16;
  localparam int MID  = (NT - 1) / 2;

  sample_t hist [NT-1];   // hist[k] = x(n-1-k)
  sample_t x [NT];        // x[k] = x(n-k)
  logic    phase;
  logic signed [AW-1:0] acc;

  always_comb begin
    x[0] = in_data;
    for (int k = 1; k < NT; k++) x[k] = hist[k-1];
  end

  always_comb begin
    acc = AW'(x[MID]) * AW'(hb_coef(STAGE, MID));
    for (int k = 0; k < MID; k++)
      if (hb_coef(STAGE, k) != 0)
        acc += (AW'(x[k]) + AW'(x[NT-1-k])) * AW'(hb_coef(STAGE, k));
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
        for (int k = 0; k < NT - 1; k++) hist[k] <= x[k];
        phase <= ~phase;
        if (phase) begin
          out_valid <= 1'b1;
          out_data  <= sat_sample((48'(acc) + (48'sd1 <<< (FR - 1))) >>> FR);
        end
      end
    end
  end

endmodule
