// cic_filter: first decimation stage, a fourth-order CIC (sinc^4) filter
// with rate change R = 16, run directly on the 1-bit modulator stream.
//
// Instead of integrators and combs the filter is evaluated as its 61-tap
// FIR equivalent, H(z) = ((1 - z^-16)/(1 - z^-1))^4 with integer taps
// 1 4 10 20 ... 2736 ... 20 10 4 1. Because each input is one bit, no
// multiplier is needed; each term a_k * x(n-k) is the constant a_k or 0.
// The terms are reduced in two ways before the final addition:
//   - seventeen groups of taps whose constants share no set bit (for
//     example 1, 4, 10 and 816 for taps 0, 1, 2 and 15) are merged by a
//     bitwise OR, which equals their sum because no carry can occur;
//   - the other 22 taps form 11 symmetric pairs of equal value a, and each
//     pair is reduced with two gates:
//       a*x1 + a*x2 = (x1 XOR x2) ? a : 0  +  (x1 AND x2) ? 2a : 0
// so 28 partial words are added instead of 61. The grouping follows the
// source design; an elaboration check confirms that every group is
// bit-disjoint.
//
// Interface: bit_valid qualifies bit_in (1 = modulator output high).
// Every DEC-th valid bit the filter output over the newest 61 bits
// (including the current one) is registered on out_data, an unsigned value
// 0 .. 65536 (2^16 = all ones), and out_valid pulses for one clock. The
// default DEC = 4 evaluates the CIC at a quarter of the modulator rate,
// because the cosine compensator that follows runs at that rate; the rest
// of the decimation by 16 takes place in the compensators.
// Latency: out_data appears one clock after the bit that completes it.
`timescale 1ns / 1ps

module cic_filter
  import adc_pkg::*;
#(
  parameter int DEC = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             bit_valid,
  input  logic             bit_in,
  output logic             out_valid,
  output logic [CIC_W-1:0] out_data
);

  localparam int NT   = CIC_TAPS;
  localparam int HALF = (NT - 1) / 2;   // 30
  localparam int CW   = $clog2(DEC) > 0 ? $clog2(DEC) : 1;

  // x[k] = x(n-k); x[0] is the current input bit.
  logic [NT-2:0] hist;
  logic [NT-1:0] x;
  assign x = {hist, bit_in};

  logic [CW-1:0] phase;
  logic [CIC_W-1:0] sum;

  if (!cic_groups_ok()) begin : g_bad_groups
    $error("cic_filter: tap groups overlap or leave unpaired taps");
  end

  always_comb begin
    logic [CIC_W-1:0] acc, word;
    logic one, both;
    acc  = '0;
    word = '0;
    one  = 1'b0;
    both = 1'b0;
    // OR-merged groups.
    for (int g = 0; g < CIC_NGRP; g++) begin
      word = '0;
      for (int m = 0; m < 4; m++)
        if (CIC_GRP[g][m] >= 0 && x[CIC_GRP[g][m]])
          word |= CIC_W'(cic_coef(CIC_GRP[g][m]));
      acc += word;
    end
    // Symmetric pairs of the remaining taps.
    for (int k = 0; k < HALF; k++)
      if (!cic_grouped(k)) begin
        one  = x[k] ^ x[NT-1-k];
        both = x[k] & x[NT-1-k];
        if (one)  acc += CIC_W'(cic_coef(k));
        if (both) acc += CIC_W'(2 * cic_coef(k));
      end
    sum = acc;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hist      <= '0;
      phase     <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= 1'b0;
      if (bit_valid) begin
        hist <= x[NT-2:0];
        if (phase == CW'(DEC - 1)) begin
          phase     <= '0;
          out_valid <= 1'b1;
          out_data  <= sum;
        end else begin
          phase <= phase + 1'b1;
        end
      end
    end
  end

endmodule
