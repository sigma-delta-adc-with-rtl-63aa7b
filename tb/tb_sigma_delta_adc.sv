// tb_sigma_delta_adc: end-to-end test of the whole converter at its
// default parameters, from an analog input voltage to words read by a DSP
// model over SPI (CPOL = 1, CPHA = 1, 1 MHz SCLK).
//
// The DSP model waits for drdy, reads one 16-bit frame and logs the code
// with its time. The sequence follows the converter's two test patterns:
//   1. bio-electric mode (reset default): DC levels, then a 500 Hz sine of
//      0.375 V amplitude,
//   2. a mode-write frame switches to bio-image mode: DC levels, then a
//      4 kHz sine of 0.375 V amplitude,
//   3. a mode-write frame switches back to bio-electric mode and a DC
//      level is checked again.
// Checked: word rate (one drdy per 400 us or 50 us), mode bit in each word,
// DC codes against 2^(B-1) * (1 + g * vin/0.75) within 2 LSB (g: DC gain
// of the half-band stages in use), the sine amplitude (projected on the
// test frequency over whole periods) against 2^(B-1) * 0.375/0.75 within
// -5/+3 %, and that the code range stays within 10 or 8 bits.
// Each mode also gets a noise test: a sine of the same amplitude at 487.5
// Hz (39 periods in 200 words) or 3950 Hz (79 periods in 400 words), so
// that every word lands on a new phase. A least-squares sine fit gives the
// signal-to-noise-and-distortion ratio, which must be within 3 dB of an
// ideal 10-bit or 8-bit quantiser (about 56 and 44 dB at half scale).
// Each mechanism (SPI read, mode write each way, drdy, both output widths)
// is counted; one that never happened is a failure.
//
// Source and choices: The two test patterns follow the source design's chip tests; the SCLK
// rate, the frame format and the tolerances are this testbench's own.
`timescale 1ns / 1ps
module tb_sigma_delta_adc;
  import adc_pkg::*;

  logic  clk = 0, rst_n = 1;
  real   vin = 0.0;
  logic  spi_sclk = 1, spi_ss_n = 1, spi_mosi = 0;
  logic  spi_miso, spi_miso_oe;
  logic  drdy;
  mode_e mode;
  int checks = 0, failures = 0;

  // SNDR limits for a sine of half full scale: an ideal B-bit quantiser
  // gives 6.02*B + 1.76 - 6.02 dB (55.9 dB at 10 bits, 43.9 dB at 8 bits);
  // the limits leave 3 dB for modulator noise and filter ripple.
  localparam real SNDR_MIN_10 = 53.0;
  localparam real SNDR_MIN_8  = 41.0;

  sigma_delta_adc dut (.*);

  always #390.625 clk = ~clk;   // 1.28 MHz

  // Analog source.
  real dc = 0.0, amp = 0.0, freq = 0.0;
  always #200 vin = dc + amp * $sin(2.0 * 3.14159265358979 * freq * ($realtime * 1.0e-9));

  // Mechanism counters.
  int n_reads = 0, n_mode_img = 0, n_mode_elec = 0, n_drdy = 0, n_w8 = 0, n_w10 = 0;
  always @(posedge drdy) n_drdy++;

  task automatic spi_frame(input logic [15:0] mo, output logic [15:0] mi);
    spi_ss_n = 0;
    #3us;
    for (int i = 15; i >= 0; i--) begin
      spi_sclk = 0;
      spi_mosi = mo[i];
      #500ns;
      spi_sclk = 1;
      mi[i] = spi_miso;
      #500ns;
    end
    #200ns spi_ss_n = 1;
    #1us;
  endtask

  task automatic set_mode(input mode_e m);
    logic [15:0] dummy;
    spi_frame({1'b1, 14'b0, logic'(m)}, dummy);
    #5us;
    checks++;
    if (mode !== m) begin failures++; $display("mode write failed"); end
    else if (m == MODE_BIO_IMAGE) n_mode_img++;
    else n_mode_elec++;
  endtask

  // Read n_words words (after discarding two: a stale one and one that may
  // have been held back during the first read); gather
  // statistics and the sine/cosine projections at frequency fit_f.
  int cmin, cmax, nw, bad_mode, bad_range;
  realtime t_first, t_last;
  real fit_f = 0.0, acc_s, acc_c, acc_m;
  // Sums for a three-parameter least-squares sine fit (offset, sin, cos).
  real q_ss, q_cc, q_sc, q_s, q_c, q_ww;
  task automatic read_words(input mode_e m, input int n_words);
    logic [15:0] w;
    int b = (m == MODE_BIO_IMAGE) ? 8 : 10;
    cmin = 1 << 20; cmax = -1; nw = 0; bad_mode = 0; bad_range = 0;
    acc_s = 0.0; acc_c = 0.0; acc_m = 0.0;
    q_ss = 0.0; q_cc = 0.0; q_sc = 0.0; q_s = 0.0; q_c = 0.0; q_ww = 0.0;
    repeat (2) begin
      wait (drdy === 1'b1);
      spi_frame(16'h0000, w);
      n_reads++;
    end
    while (nw < n_words) begin
      wait (drdy === 1'b1);
      spi_frame(16'h0000, w);
      n_reads++;
      if (nw == 0) t_first = $realtime;
      t_last = $realtime;
      nw++;
      if (w[15] !== logic'(m)) bad_mode++;
      if (w[14:0] >= (15'd1 << b)) bad_range++;
      if (b == 8) n_w8++; else n_w10++;
      if (int'(w[9:0]) < cmin) cmin = int'(w[9:0]);
      if (int'(w[9:0]) > cmax) cmax = int'(w[9:0]);
      begin
        // Words come on an exact grid; the read time itself varies by up
        // to a clock period with where drdy falls, so use the grid.
        real tk = t_first + real'(nw - 1) * ((m == MODE_BIO_IMAGE) ? 50.0e3 : 400.0e3);
        real sv = $sin(2.0 * 3.14159265358979 * fit_f * tk * 1.0e-9);
        real cv = $cos(2.0 * 3.14159265358979 * fit_f * tk * 1.0e-9);
        real wv = real'(w[9:0]);
        acc_m += wv;
        acc_s += wv * sv;
        acc_c += wv * cv;
        q_ss += sv * sv; q_cc += cv * cv; q_sc += sv * cv;
        q_s  += sv;      q_c  += cv;      q_ww += wv * wv;
      end
    end
  endtask

  function automatic void check_common(mode_e m);
    real period = (m == MODE_BIO_IMAGE) ? 50.0e3 : 400.0e3;   // ns
    real rate_meas;
    checks += 3;
    if (nw < 5) begin failures++; $display("too few words: %0d", nw); return; end
    rate_meas = (t_last - t_first) / real'(nw - 1);
    if (rate_meas < 0.98 * period || rate_meas > 1.02 * period) begin
      failures++; $display("word period %f ns, expected %f", rate_meas, period);
    end
    if (bad_mode != 0) begin failures++; $display("mode bit wrong in %0d words", bad_mode); end
    if (bad_range != 0) begin failures++; $display("%0d words out of range", bad_range); end
  endfunction

  task automatic dc_test(input mode_e m, input real d, input real t_settle);
    int b = (m == MODE_BIO_IMAGE) ? 8 : 10;
    real g = (16364.0 / 16384.0) *
             ((m == MODE_BIO_IMAGE) ? 1.0 : (1018.0 / 1024.0) ** 2 * (4072.0 / 4096.0));
    real ideal = (2.0 ** (b - 1)) * (1.0 + g * d / 0.75);
    dc = d; amp = 0.0;
    #(t_settle * 1s);
    read_words(m, 10);
    check_common(m);
    checks++;
    if (real'(cmin) < ideal - 2.0 || real'(cmax) > ideal + 2.0) begin
      failures++;
      $display("DC %f mode %0d: codes %0d..%0d, ideal %f", d, m, cmin, cmax, ideal);
    end
  endtask

  // The words are read at one fixed delay after each output sample, so
  // projecting them on sin/cos at the read times over a whole number of
  // periods gives the sine amplitude in codes.
  // Signal-to-noise-and-distortion ratio of the words just read: solve the
  // 3x3 normal equations for w ~ m + A sin + B cos (Cramer's rule); the
  // residual sum of squares at the solution is sum(w^2) - m*sum(w)
  // - A*sum(w sin) - B*sum(w cos).
  function automatic real sndr_db();
    real n = real'(nw);
    real a11 = n,   a12 = q_s,  a13 = q_c;
    real a22 = q_ss, a23 = q_sc, a33 = q_cc;
    real det, m0, am, bm, res, sig;
    det = a11 * (a22 * a33 - a23 * a23) - a12 * (a12 * a33 - a23 * a13)
        + a13 * (a12 * a23 - a22 * a13);
    m0 = (acc_m * (a22 * a33 - a23 * a23) - a12 * (acc_s * a33 - a23 * acc_c)
        + a13 * (acc_s * a23 - a22 * acc_c)) / det;
    am = (a11 * (acc_s * a33 - a23 * acc_c) - acc_m * (a12 * a33 - a23 * a13)
        + a13 * (a12 * acc_c - acc_s * a13)) / det;
    bm = (a11 * (a22 * acc_c - acc_s * a23) - a12 * (a12 * acc_c - acc_s * a13)
        + acc_m * (a12 * a23 - a22 * a13)) / det;
    res = (q_ww - m0 * acc_m - am * acc_s - bm * acc_c) / n;
    sig = (am * am + bm * bm) / 2.0;
    if (res < 1.0e-12) res = 1.0e-12;
    return 10.0 * $log10(sig / res);
  endfunction

  task automatic sine_test(input mode_e m, input real a, input real f, input real t_settle,
                           input int n_words, input real min_sndr);
    int b = (m == MODE_BIO_IMAGE) ? 8 : 10;
    real ideal = (2.0 ** (b - 1)) * a / 0.75;
    real meas, snd;
    dc = 0.0; amp = a; freq = f; fit_f = f;
    #(t_settle * 1s);
    read_words(m, n_words);
    check_common(m);
    meas = 2.0 / real'(nw) * $sqrt(acc_s * acc_s + acc_c * acc_c);
    checks++;
    if (meas < 0.95 * ideal || meas > 1.03 * ideal) begin
      failures++;
      $display("sine %f Hz mode %0d: amplitude %f codes, ideal %f", f, m, meas, ideal);
    end
    snd = sndr_db();
    $display("sine %0.0f Hz, %0d-bit words: amplitude %0.2f codes, SNDR %0.1f dB over %0d words",
             f, b, meas, snd, nw);
    checks++;
    if (snd < min_sndr) begin
      failures++;
      $display("SNDR %f dB below %f dB", snd, min_sndr);
    end
  endtask

  initial begin
    #100ns rst_n = 0;
    #2us rst_n = 1;
    checks++;
    if (mode !== MODE_BIO_ELECTRIC) begin failures++; $display("reset mode wrong"); end
    // 1. bio-electric mode
    dc_test(MODE_BIO_ELECTRIC, 0.25, 0.008);
    dc_test(MODE_BIO_ELECTRIC, -0.4, 0.008);
    sine_test(MODE_BIO_ELECTRIC, 0.375, 500.0, 0.006, 20, 0.0);
    // Noise test: 39 periods in 200 words, so every word falls on a new
    // phase of the sine and the code error cannot hide in the fit.
    sine_test(MODE_BIO_ELECTRIC, 0.375, 487.5, 0.012, 200, SNDR_MIN_10);
    // 2. bio-image mode
    set_mode(MODE_BIO_IMAGE);
    dc_test(MODE_BIO_IMAGE, 0.5, 0.002);
    dc_test(MODE_BIO_IMAGE, -0.3, 0.002);
    sine_test(MODE_BIO_IMAGE, 0.375, 4000.0, 0.002, 40, 0.0);
    sine_test(MODE_BIO_IMAGE, 0.375, 3950.0, 0.001, 400, SNDR_MIN_8);   // 79 periods
    // 3. back to bio-electric mode
    set_mode(MODE_BIO_ELECTRIC);
    dc_test(MODE_BIO_ELECTRIC, 0.1, 0.008);
    checks += 6;
    if (n_reads == 0)     begin failures++; $display("no SPI reads"); end
    if (n_mode_img == 0)  begin failures++; $display("no switch to bio-image"); end
    if (n_mode_elec == 0) begin failures++; $display("no switch to bio-electric"); end
    if (n_drdy == 0)      begin failures++; $display("drdy never rose"); end
    if (n_w8 == 0)        begin failures++; $display("no 8-bit words"); end
    if (n_w10 == 0)       begin failures++; $display("no 10-bit words"); end
    $display("mechanisms: reads=%0d mode->image=%0d mode->electric=%0d drdy=%0d 8-bit=%0d 10-bit=%0d",
             n_reads, n_mode_img, n_mode_elec, n_drdy, n_w8, n_w10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #400ms;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
