// cos_comp: cosine compensator, three cascaded cosine filters
// ((1 + z^-1)/2)^3 = (x(n) + 3x(n-1) + 3x(n-2) + x(n-3)) / 8, followed by
// decimation by 2.
//
// It runs at a quarter of the modulator rate, so one delay here equals
// four modulator samples and the filter is the (1 + z^-4)/2 of the
// modulator-rate description. Its zeros fall on the aliasing bands the
// sine compensator would otherwise lift. The multiplications by 3 are a
// shift and an add. The sum is rounded to nearest on the division by 8.
//
// Interface: in_valid/in_data at the input rate; out_valid pulses for one
// clock on every second input, one clock after that input, with the output
// computed over the current and three previous inputs.
`timescale 1ns / 1ps

module cos_comp
  import adc_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  sample_t in_data,
  output logic    out_valid,
  output sample_t out_data
);

  sample_t d1, d2, d3;
  logic    phase;
  logic signed [SAMPLE_W+3:0] acc;

  always_comb begin
    logic signed [SAMPLE_W+3:0] m1, m2;
    m1  = (SAMPLE_W + 4)'(d1) + ((SAMPLE_W + 4)'(d1) <<< 1);
    m2  = (SAMPLE_W + 4)'(d2) + ((SAMPLE_W + 4)'(d2) <<< 1);
    acc = (SAMPLE_W + 4)'(in_data) + m1 + m2 + (SAMPLE_W + 4)'(d3);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d1 <= '0; d2 <= '0; d3 <= '0;
      phase     <= 1'b0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        d1 <= in_data; d2 <= d1; d3 <= d2;
        phase <= ~phase;
        if (phase) begin
          out_valid <= 1'b1;
          out_data  <= sat_sample((48'(acc) + 48'sd4) >>> COS_FRAC);
        end
      end
    end
  end

endmodule
