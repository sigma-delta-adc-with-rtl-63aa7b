// tb_decimation_filter: end-to-end test of the seven-stage decimator.
// A second-order modulator written here in real arithmetic (same loop as
// the analog design: gains 0.25/0.25/1/0.5, DAC +/-0.75 V) produces the bit
// stream, one bit every second clock as at 1.28 MHz / 640 kHz. Checks:
//   - output word spacing: 512 clocks (OSR 256) in bio-electric mode and
//     64 clocks (OSR 32) in bio-image mode,
//   - DC inputs give the code 2^(B-1) * (1 + g * vin/0.75) within 2 LSB,
//     where g is the DC gain of the half-band stages in use (the quantised
//     coefficients sum to 16364/16384, 1018/1024 and 4072/4096),
//   - a 400 Hz (bio-electric) or 3.2 kHz (bio-image) sine of 0.375 V
//     amplitude gives codes that swing by 2^(B-1) within 3 %, i.e. the
//     compensated pass band has close to unit gain,
//   - the mode bit in each word follows the mode input.
//
// Source and choices: The rates, test frequencies and amplitude follow the source design's
// tests; the tolerances are this testbench's own.
`timescale 1ns / 1ps
module tb_decimation_filter;
  import adc_pkg::*;

  logic clk = 0, rst_n = 0;
  mode_e mode = MODE_BIO_ELECTRIC;
  logic bit_valid = 0, bit_in = 0;
  logic out_valid;
  logic [15:0] out_word;
  int checks = 0, failures = 0;

  decimation_filter dut (.*);

  always #390.625 clk = ~clk;   // 1.28 MHz

  // Input signal and modulator model.
  real vin = 0.0, freq = 0.0, amp = 0.0, dc = 0.0, t_s = 0.0;
  real i1 = 0.0, i2 = 0.0;
  logic y = 0;
  logic phase = 0;
  longint cyc = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    phase <= ~phase;
    bit_valid <= 0;
    if (rst_n && phase) begin
      real v, n1, n2;
      t_s = t_s + 1.0 / 640000.0;
      vin = dc + amp * $sin(2.0 * 3.14159265358979 * freq * t_s);
      v  = y ? 0.75 : -0.75;
      n1 = i1 + 0.25 * vin - 0.25 * v;
      n2 = i2 + i1 - 0.5 * v;
      i1 = n1; i2 = n2;
      y  = (i2 >= 0.0);
      bit_valid <= 1;
      bit_in    <= y;
    end
  end

  // Output monitor.
  longint last_cyc = -1;
  int     nout = 0, cmin = 99999, cmax = -1, clast = 0;
  int     rate_err = 0, mode_err = 0;
  int     expect_gap = 512;

  always @(posedge clk) begin
    if (out_valid) begin
      int code;
      code = int'(out_word[9:0]);
      if (last_cyc >= 0 && nout > 0 && cyc - last_cyc != longint'(expect_gap)) rate_err++;
      if (out_word[15] !== mode) mode_err++;
      last_cyc = cyc;
      nout++;
      clast = code;
      if (code < cmin) cmin = code;
      if (code > cmax) cmax = code;
    end
  end

  task automatic settle_and_measure(input mode_e m, input real d, input real a,
                                    input real f, input real t_settle, input real t_meas);
    mode = m;
    expect_gap = (m == MODE_BIO_IMAGE) ? 64 : 512;
    dc = d; amp = a; freq = f;
    #(t_settle * 1s);
    nout = 0; cmin = 99999; cmax = -1; rate_err = 0; mode_err = 0; last_cyc = -1;
    #(t_meas * 1s);
  endtask

  function automatic void check_dc(mode_e m, real d);
    int b = (m == MODE_BIO_IMAGE) ? 8 : 10;
    real g = (16364.0 / 16384.0) *
             ((m == MODE_BIO_IMAGE) ? 1.0 : (1018.0 / 1024.0) ** 2 * (4072.0 / 4096.0));
    real ideal = (2.0 ** (b - 1)) * (1.0 + g * d / 0.75);
    checks += 4;
    if (nout < 3) begin failures++; $display("no outputs"); end
    if (rate_err != 0) begin failures++; $display("output spacing wrong %0d times", rate_err); end
    if (mode_err != 0) begin failures++; $display("mode bit wrong"); end
    if (real'(cmin) < ideal - 2.0 || real'(cmax) > ideal + 2.0) begin
      failures++;
      $display("DC %f mode %0d: codes %0d..%0d, ideal %f", d, m, cmin, cmax, ideal);
    end
  endfunction

  function automatic void check_sine(mode_e m, real a);
    int b = (m == MODE_BIO_IMAGE) ? 8 : 10;
    real swing = (2.0 ** (b - 1)) * 2.0 * a / 0.75;
    checks += 2;
    if (rate_err != 0) begin failures++; $display("output spacing wrong"); end
    if (real'(cmax - cmin) < 0.97 * swing || real'(cmax - cmin) > 1.03 * swing) begin
      failures++;
      $display("sine mode %0d: swing %0d, ideal %f", m, cmax - cmin, swing);
    end
  endfunction

  initial begin
    repeat (4) @(posedge clk);
    rst_n <= 1;
    settle_and_measure(MODE_BIO_ELECTRIC, 0.3, 0.0, 0.0, 0.008, 0.004);
    check_dc(MODE_BIO_ELECTRIC, 0.3);
    settle_and_measure(MODE_BIO_ELECTRIC, -0.5, 0.0, 0.0, 0.008, 0.004);
    check_dc(MODE_BIO_ELECTRIC, -0.5);
    settle_and_measure(MODE_BIO_IMAGE, 0.6, 0.0, 0.0, 0.002, 0.002);
    check_dc(MODE_BIO_IMAGE, 0.6);
    settle_and_measure(MODE_BIO_IMAGE, -0.2, 0.0, 0.0, 0.002, 0.002);
    check_dc(MODE_BIO_IMAGE, -0.2);
    settle_and_measure(MODE_BIO_IMAGE, 0.0, 0.375, 3200.0, 0.002, 0.005);
    check_sine(MODE_BIO_IMAGE, 0.375);
    settle_and_measure(MODE_BIO_ELECTRIC, 0.0, 0.375, 400.0, 0.008, 0.010);
    check_sine(MODE_BIO_ELECTRIC, 0.375);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100ms;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
