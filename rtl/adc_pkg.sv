// adc_pkg: types and constants shared by the decimation chain of the
// two-mode sigma-delta ADC.
//
// Samples between filter stages are signed fixed-point words of SAMPLE_W
// bits in which +/-2^16 stands for the modulator's full scale (+/-VREF).
// Two guard bits above full scale absorb the sine compensator's gain of up
// to 2 at high frequency.
//
// The filter coefficients are derived here from their defining formulas:
//   - sinc^4 CIC, R = 16:   ((1 - z^-16) / (1 - z^-1))^4, 61 taps, sum 2^16
//   - sine compensator:     ((-1 + 6 z^-1 - z^-2) / 4)^4, 9 taps, sum 2^8
//     (z^-1 here is one sample at the compensator's own rate)
//   - cosine compensator:   ((1 + z^-1) / 2)^3 = [1 3 3 1] / 8
// The half-band coefficients are the quantised values of the published
// design (13-bit, 10-bit, 10-bit and 11-bit words), held as integers over
// 2^14, 2^10, 2^10 and 2^12 respectively.
`timescale 1ns / 1ps

package adc_pkg;

  localparam int SAMPLE_W = 18;
  typedef logic signed [SAMPLE_W-1:0] sample_t;

  // Operating mode, chosen by the DSP over SPI.
  typedef enum logic {
    MODE_BIO_ELECTRIC = 1'b0,  // OSR 256, 1.25 kHz band, 10-bit output
    MODE_BIO_IMAGE    = 1'b1   // OSR 32, 10 kHz band, 8-bit output
  } mode_e;

  localparam int CIC_R     = 16;
  localparam int CIC_N     = 4;
  localparam int CIC_TAPS  = CIC_N * (CIC_R - 1) + 1;  // 61
  localparam int CIC_W     = 17;                       // 0 .. 65536
  localparam int CIC_MID   = 32768;                    // 2^16 / 2

  // Binomial coefficient n over r (0 when n < r).
  function automatic int binom(int n, int r);
    int b = 1;
    if (n < r || r < 0) return 0;
    for (int i = 1; i <= r; i++) b = b * (n - r + i) / i;
    return b;
  endfunction

  // Coefficient of z^-k in ((1 - z^-R)/(1 - z^-1))^N, i.e. the number of
  // ways k is a sum of N integers in 0 .. R-1:
  //   sum over j of (-1)^j * C(N, j) * C(k - R*j + N - 1, N - 1).
  function automatic int cic_coef(int k);
    int c = 0;
    for (int j = 0; j <= CIC_N; j++)
      if (k - CIC_R * j >= 0)
        c += ((j % 2) != 0 ? -1 : 1) * binom(CIC_N, j) * binom(k - CIC_R * j + CIC_N - 1, CIC_N - 1);
    return c;
  endfunction

  // Tap groups whose constants have no set bit in common, so that the sum
  // of their terms is a plain bitwise OR of the selected constants (no
  // carries). Seventeen such groups cover 39 of the 61 taps; -1 pads a
  // group. The remaining 22 taps form 11 mirrored pairs of equal value.
  localparam int CIC_NGRP = 17;
  localparam int CIC_GRP [CIC_NGRP][4] = '{
    '{ 0,  1,  2, 15}, '{ 3, 14, -1, -1}, '{ 4,  9, -1, -1}, '{12,  5, -1, -1},
    '{ 6, 18, 29, -1}, '{ 8, 21, -1, -1}, '{13, 26, -1, -1}, '{19, 23, -1, -1},
    '{60, 59, 58, 45}, '{57, 46, -1, -1}, '{51, 56, -1, -1}, '{48, 55, -1, -1},
    '{31, 42, 54, -1}, '{39, 52, -1, -1}, '{34, 47, -1, -1}, '{41, 37, -1, -1},
    '{30, -1, -1, -1}};

  // 1 if tap k belongs to one of the OR groups.
  function automatic bit cic_grouped(int k);
    for (int g = 0; g < CIC_NGRP; g++)
      for (int m = 0; m < 4; m++)
        if (CIC_GRP[g][m] == k) return 1'b1;
    return 1'b0;
  endfunction

  // 1 if every group is bit-disjoint and the taps outside the groups come
  // in mirrored pairs (k and 60 - k).
  function automatic bit cic_groups_ok();
    for (int g = 0; g < CIC_NGRP; g++) begin
      int acc = 0;
      for (int m = 0; m < 4; m++)
        if (CIC_GRP[g][m] >= 0) begin
          if ((acc & cic_coef(CIC_GRP[g][m])) != 0) return 1'b0;
          acc |= cic_coef(CIC_GRP[g][m]);
        end
    end
    for (int k = 0; k < CIC_TAPS; k++)
      if (cic_grouped(k) != cic_grouped(CIC_TAPS - 1 - k)) return 1'b0;
    return 1'b1;
  endfunction

  localparam int SIN_TAPS = 9;
  localparam int SIN_FRAC = 8;   // (1/4)^4

  // Coefficient of z^-k in (-1 + 6 z^-1 - z^-2)^4 (multinomial expansion).
  function automatic int sin_coef(int k);
    int c = 0;
    int fact [5] = '{1, 1, 2, 6, 24};
    // i zeros (-1), j ones (6 z^-1), l twos (-z^-2), i+j+l = 4, j+2l = k
    for (int l = 0; l <= 4; l++) begin
      int j = k - 2 * l;
      int i = 4 - j - l;
      if (j >= 0 && i >= 0) begin
        int t = fact[4] / (fact[i] * fact[j] * fact[l]);
        for (int n = 0; n < j; n++) t = t * 6;
        if (((i + l) % 2) == 1) t = -t;
        c += t;
      end
    end
    return c;
  endfunction

  localparam int COS_FRAC = 3;   // (1/2)^3

  // Half-band filters: stage 1 .. 4.
  localparam int HB1_TAPS = 31;
  localparam int HB2_TAPS = 15;
  localparam int HB4_TAPS = 23;

  localparam int HB1_C [HB1_TAPS] = '{
    -34, 0, 76, 0, -154, 0, 282, 0, -488, 0, 844, 0, -1612, 0, 5172, 8192,
    5172, 0, -1612, 0, 844, 0, -488, 0, 282, 0, -154, 0, 76, 0, -34};
  localparam int HB2_C [HB2_TAPS] = '{
    -12, 0, 34, 0, -87, 0, 318, 512, 318, 0, -87, 0, 34, 0, -12};
  localparam int HB4_C [HB4_TAPS] = '{
    -30, 0, 56, 0, -108, 0, 200, 0, -396, 0, 1290, 2048,
    1290, 0, -396, 0, 200, 0, -108, 0, 56, 0, -30};

  function automatic int hb_taps(int stage);
    case (stage)
      1:       return HB1_TAPS;
      4:       return HB4_TAPS;
      default: return HB2_TAPS;
    endcase
  endfunction

  function automatic int hb_frac(int stage);
    case (stage)
      1:       return 14;
      4:       return 12;
      default: return 10;
    endcase
  endfunction

  function automatic int hb_coef(int stage, int k);
    case (stage)
      1:       return HB1_C[k];
      4:       return HB4_C[k];
      default: return HB2_C[k];
    endcase
  endfunction

  // Saturate a wide signed value to a sample.
  function automatic sample_t sat_sample(logic signed [47:0] v);
    localparam logic signed [47:0] MAXV = 48'sd2 ** (SAMPLE_W - 1) - 1;
    localparam logic signed [47:0] MINV = -(48'sd2 ** (SAMPLE_W - 1));
    if (v > MAXV) return sample_t'(MAXV);
    if (v < MINV) return sample_t'(MINV);
    return sample_t'(v);
  endfunction

endpackage
