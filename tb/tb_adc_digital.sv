// tb_adc_digital: test of the synthesizable digital part on its own.
// A discrete-time second-order modulator in this testbench (gains
// 0.25/0.25/1/0.5, DAC +/-0.75 V) updates its bit just after each falling
// edge of fs_clk, as the analog modulator does, and the DSP model reads
// words over SPI (CPOL = 1, CPHA = 1, 1 MHz SCLK). The sequence, the checks
// and the mechanism counters are those of the whole-chip test: DC levels
// and a 500 Hz sine in bio-electric mode, a mode write, DC levels and a
// 4 kHz sine in bio-image mode, a mode write back. In addition fs_clk must
// run at exactly half the clk rate.
//
// Source and choices: The SPI mode and rates follow the source design; the SCLK rate, the
// frame format and the tolerances are this testbench's own.
`timescale 1ns / 1ps
module tb_adc_digital;
  import adc_pkg::*;

  logic  clk = 0, rst_n = 1;
  real   vin = 0.0;
  logic  spi_sclk = 1, spi_ss_n = 1, spi_mosi = 0;
  logic  spi_miso, spi_miso_oe;
  logic  drdy;
  mode_e mode;
  int checks = 0, failures = 0;

  logic fs_clk, mod_bit;
  adc_digital dut (.*);

  // Modulator model, clocked by the sampling clock.
  real i1 = 0.0, i2 = 0.0;
  logic y_mod = 1'b0;
  assign mod_bit = y_mod;
  always @(negedge fs_clk) begin
    real v, n1, n2;
    #20;
    v  = y_mod ? 0.75 : -0.75;
    n1 = i1 + 0.25 * vin - 0.25 * v;
    n2 = i2 + i1 - 0.5 * v;
    i1 = n1; i2 = n2;
    y_mod = (i2 >= 0.0);
  end

  int n_clk = 0, n_fs = 0;
  always @(posedge clk) n_clk++;
  always @(posedge fs_clk) n_fs++;

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
  task automatic read_words(input mode_e m, input int n_words);
    logic [15:0] w;
    int b = (m == MODE_BIO_IMAGE) ? 8 : 10;
    cmin = 1 << 20; cmax = -1; nw = 0; bad_mode = 0; bad_range = 0;
    acc_s = 0.0; acc_c = 0.0; acc_m = 0.0;
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
      acc_m += real'(w[9:0]);
      acc_s += real'(w[9:0]) * $sin(2.0 * 3.14159265358979 * fit_f * $realtime * 1.0e-9);
      acc_c += real'(w[9:0]) * $cos(2.0 * 3.14159265358979 * fit_f * $realtime * 1.0e-9);
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
  task automatic sine_test(input mode_e m, input real a, input real f, input real t_settle,
                           input int n_words);
    int b = (m == MODE_BIO_IMAGE) ? 8 : 10;
    real ideal = (2.0 ** (b - 1)) * a / 0.75;
    real meas;
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
  endtask

  initial begin
    #100ns rst_n = 0;
    #2us rst_n = 1;
    checks++;
    if (mode !== MODE_BIO_ELECTRIC) begin failures++; $display("reset mode wrong"); end
    // 1. bio-electric mode
    dc_test(MODE_BIO_ELECTRIC, 0.25, 0.008);
    dc_test(MODE_BIO_ELECTRIC, -0.4, 0.008);
    sine_test(MODE_BIO_ELECTRIC, 0.375, 500.0, 0.006, 20);
    // 2. bio-image mode
    set_mode(MODE_BIO_IMAGE);
    dc_test(MODE_BIO_IMAGE, 0.5, 0.002);
    dc_test(MODE_BIO_IMAGE, -0.3, 0.002);
    sine_test(MODE_BIO_IMAGE, 0.375, 4000.0, 0.002, 40);
    // 3. back to bio-electric mode
    set_mode(MODE_BIO_ELECTRIC);
    dc_test(MODE_BIO_ELECTRIC, 0.1, 0.008);
    checks++;
    if (n_fs < n_clk / 2 - 1 || n_fs > n_clk / 2 + 1) begin
      failures++; $display("fs_clk %0d edges for %0d clk edges", n_fs, n_clk);
    end
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
    #200ms;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
