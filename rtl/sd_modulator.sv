// sd_modulator: behavioural model of the second-order switched-capacitor
// sigma-delta modulator with a one-bit quantiser (an analog circuit; this
// model is not synthesizable).
//
// Loop: two delaying integrators z^-1/(1 - z^-1) in cascade, a 1-bit
// quantiser and a 1-bit DAC fed back to both integrator inputs:
//   i1[n+1] = i1[n] + A1*vin[n] - B1*v[n]
//   i2[n+1] = i2[n] + A2*i1[n]  - B2*v[n]
//   y[n]    = (i2[n] >= 0),   v[n] = y ? +VREF : -VREF
// with A1 = B1 = 0.25, A2 = 1, B2 = 0.5, the scaling that keeps the first
// integrator's swing small. The ideal loop has STF = z^-2 (scaled) and
// NTF = (1 - z^-1)^2 shaping.
//
// Timing: the input is sampled and both integrators update on the rising
// edge of p1d (the delayed sampling phase, which opens after p1); the
// comparator decision on the new i2 is available on y from then on. The
// digital side reads y half a sample later. Opamp gain, swing, noise,
// comparator offset and switch non-idealities are not modelled; an
// optional comparator offset can be set with VOFFSET.
//
// Source and choices: the loop structure and coefficients follow the
// source design; the update edge and the ideal (noise-free) integrators
// are this model's choices.
`timescale 1ns / 1ps

module sd_modulator #(
  parameter real A1      = 0.25,
  parameter real B1      = 0.25,
  parameter real A2      = 1.0,
  parameter real B2      = 0.5,
  parameter real VREF    = 0.75,   // DAC level and input full scale (V)
  parameter real VOFFSET = 0.0     // comparator offset (V)
) (
  input  real  vin,    // differential input voltage (V)
  input  logic rst_n,
  input  logic p1,
  input  logic p1d,
  input  logic p2,
  input  logic p2d,
  output logic y
);
  real i1, i2;

  always @(posedge p1d or negedge rst_n) begin
    if (!rst_n) begin
      i1 <= 0.0;
      i2 <= 0.0;
      y  <= 1'b0;
    end else begin
      real v, i1_next, i2_next;
      v       = y ? VREF : -VREF;
      i1_next = i1 + A1 * vin - B1 * v;
      i2_next = i2 + A2 * i1  - B2 * v;
      i1 <= i1_next;
      i2 <= i2_next;
      y  <= (i2_next + VOFFSET >= 0.0);
    end
  end

  // p1, p2 and p2d switch the capacitors of the real circuit; the model
  // needs only the edge of p1d.
  wire unused_phases = p1 ^ p2 ^ p2d;

endmodule
