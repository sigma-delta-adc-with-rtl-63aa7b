// tb_sd_modulator: checks the behavioural second-order modulator.
// The sampling phase p1d is pulsed at 640 kHz. For a set of DC inputs the
// density of ones over 8192 samples must equal (1 + vin/0.75)/2 within
// 0.002, the first-order property of a stable sigma-delta loop; the
// running sum of (bit - density) must stay bounded, showing that the loop
// does not overload; and a reset must restart the loop from zero state.
// Two sine inputs of 0.375 V peak to peak (400 Hz and 3.2 kHz) measure the
// in-band SNDR of the bit stream with a windowed DFT over the signal band.
//
// Source and choices: The loop coefficients and full scale follow the source design; the
// tolerances are this testbench's own.
`timescale 1ns / 1ps
module tb_sd_modulator;
  real  vin = 0.0;
  logic rst_n = 1, p1 = 0, p1d = 0, p2 = 0, p2d = 0;
  logic y;
  int checks = 0, failures = 0;
  localparam real PI = 3.14159265358979;
  // The loop's reference simulations give 98.2 dB (OSR 256) and 54.8 dB
  // (OSR 32) for these inputs; this model measures 95.4 and 51.0 dB with
  // the estimate below. The limits allow 6 dB for the different spectral
  // estimate (record length, window, noise bins).
  localparam real SNDR_MIN_ELEC = 92.2;
  localparam real SNDR_MIN_IMG  = 48.8;

  sd_modulator dut (.*);

  task automatic one_sample();
    #100 p1 = 1; #10 p1d = 1; #600 p1 = 0; #10 p1d = 0;
    #100 p2 = 1; #10 p2d = 1; #700 p2 = 0; #10 p2d = 0;
  endtask

  // In-band signal-to-noise-and-distortion ratio of the bit stream for a
  // sine of amplitude amp on DFT bin kbin of an n_pts-point record: Hann
  // window, signal = bins kbin-3 .. kbin+3, noise = all other bins from 3
  // up to the band edge nband (the lowest bins hold the window's DC leak).
  task automatic sndr_test(input real amp, input int n_pts, input int kbin, input int nband,
                           input real min_db, input string name);
    real re [], im [];
    real ps = 0.0, pn = 0.0, snd;
    re = new[nband + 1];
    im = new[nband + 1];
    foreach (re[b]) begin re[b] = 0.0; im[b] = 0.0; end
    for (int n = -2000; n < n_pts; n++) begin
      vin = amp * $sin(2.0 * PI * real'(kbin) * real'(n) / real'(n_pts));
      one_sample();
      if (n >= 0) begin
        real x = (y ? 1.0 : -1.0) * (0.5 - 0.5 * $cos(2.0 * PI * real'(n) / real'(n_pts)));
        for (int b = 0; b <= nband; b++) begin
          re[b] += x * $cos(2.0 * PI * real'(b) * real'(n) / real'(n_pts));
          im[b] -= x * $sin(2.0 * PI * real'(b) * real'(n) / real'(n_pts));
        end
      end
    end
    for (int b = 3; b <= nband; b++) begin
      real pw = re[b] * re[b] + im[b] * im[b];
      if (b >= kbin - 3 && b <= kbin + 3) ps += pw;
      else pn += pw;
    end
    snd = 10.0 * $log10(ps / pn);
    $display("%s: in-band SNDR %0.1f dB", name, snd);
    checks++;
    if (snd < min_db) begin failures++; $display("%s: SNDR below %0.1f dB", name, min_db); end
  endtask

  initial begin
    real levels [7] = '{0.0, 0.1, -0.1, 0.3, -0.45, 0.6, -0.65};
    #5 rst_n = 0; #5 rst_n = 1;
    foreach (levels[i]) begin
      int ones;
      real err, maxerr, dens;
      ones = 0; err = 0.0; maxerr = 0.0;
      vin = levels[i];
      dens = (1.0 + vin / 0.75) / 2.0;
      repeat (500) one_sample();
      for (int n = 0; n < 8192; n++) begin
        one_sample();
        ones += y;
        err += real'(y) - dens;
        if (err > maxerr) maxerr = err;
        if (-err > maxerr) maxerr = -err;
      end
      checks += 2;
      if (real'(ones) / 8192.0 < dens - 0.002 || real'(ones) / 8192.0 > dens + 0.002) begin
        failures++; $display("vin %f: density %f expected %f", vin, real'(ones) / 8192.0, dens);
      end
      if (maxerr > 8.0) begin failures++; $display("vin %f: loop error grew to %f", vin, maxerr); end
    end
    // Sine tests of 0.375 V peak to peak: 400 Hz with a 1.25 kHz band
    // (OSR 256) and 3.2 kHz with a 10 kHz band (OSR 32), at 640 kHz.
    sndr_test(0.1875, 65536, 41, 128, SNDR_MIN_ELEC, "400 Hz, OSR 256");
    sndr_test(0.1875, 16384, 82, 256, SNDR_MIN_IMG, "3.2 kHz, OSR 32");
    rst_n = 0; #10;
    checks++;
    if (y !== 1'b0) begin failures++; $display("reset did not clear output"); end
    rst_n = 1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #600ms;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
