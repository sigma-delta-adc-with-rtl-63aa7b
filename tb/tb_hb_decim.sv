// tb_hb_decim: self-checking test of the four half-band decimators.
// All four coefficient sets run side by side on the same input: random,
// full-range and alternating full-scale samples with random gaps. Every
// second input must produce an output one clock later, equal to the
// convolution with the published quantised coefficients (entered here as
// decimal fractions), rounded to nearest and saturated. The alternating
// full-scale input drives the filters into saturation.
// Finally an impulse on each input parity recovers every tap from the
// outputs, and the frequency response computed from it is held against
// the half-band specification (pass-band ripple, stop-band attenuation).
//
// Source and choices: The coefficients are the published quantised ones; the rounding,
// saturation and strobe timing are this design's choices.
`timescale 1ns / 1ps
module tb_hb_decim;
  import adc_pkg::*;

  localparam int NS = 4;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  sample_t in_data = '0;
  logic    out_valid [NS];
  sample_t out_data  [NS];
  int checks = 0, failures = 0, nsat = 0;
  longint cyc = 0;

  hb_decim #(.STAGE(1)) u_0 (.clk, .rst_n, .in_valid, .in_data, .out_valid(out_valid[0]), .out_data(out_data[0]));
  hb_decim #(.STAGE(2)) u_1 (.clk, .rst_n, .in_valid, .in_data, .out_valid(out_valid[1]), .out_data(out_data[1]));
  hb_decim #(.STAGE(3)) u_2 (.clk, .rst_n, .in_valid, .in_data, .out_valid(out_valid[2]), .out_data(out_data[2]));
  hb_decim #(.STAGE(4)) u_3 (.clk, .rst_n, .in_valid, .in_data, .out_valid(out_valid[3]), .out_data(out_data[3]));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  localparam int NTAPS [NS] = '{31, 15, 15, 23};
  localparam int FRAC  [NS] = '{14, 10, 10, 12};
  longint coef [NS][31];
  longint hist [$];
  longint exp_val_q [NS][$];
  longint exp_cyc_q [NS][$];
  int     exp_n_q   [NS][$];   // input count each expected output belongs to
  int     imp_at = -1000;      // input count of the current impulse
  longint h_meas [NS][31];     // measured impulse response, x 2^15
  int nin = 0;
  int nout [NS];

  // Published half-band coefficients (first half and centre), scaled to
  // integers over 2^FRAC and mirrored.
  initial begin
    begin real h [16] = '{-0.0020751953125, 0, 0.004638671875, 0, -0.0093994140625, 0, 0.0172119140625, 0, -0.02978515625, 0, 0.051513671875, 0, -0.098388671875, 0, 0.315673828125, 0.5};
      for (int k = 0; k < 16; k++) begin
        coef[0][k] = longint'($rtoi(h[k] * 16384.0 + (h[k] < 0 ? -0.5 : 0.5)));
        coef[0][30-k] = coef[0][k];
      end
    end
    begin real h [8] = '{-0.01171875, 0, 0.033203125, 0, -0.0849609375, 0, 0.310546875, 0.5};
      for (int k = 0; k < 8; k++) begin
        coef[1][k] = longint'($rtoi(h[k] * 1024.0 + (h[k] < 0 ? -0.5 : 0.5)));
        coef[1][14-k] = coef[1][k];
      end
    end
    begin real h [8] = '{-0.01171875, 0, 0.033203125, 0, -0.0849609375, 0, 0.310546875, 0.5};
      for (int k = 0; k < 8; k++) begin
        coef[2][k] = longint'($rtoi(h[k] * 1024.0 + (h[k] < 0 ? -0.5 : 0.5)));
        coef[2][14-k] = coef[2][k];
      end
    end
    begin real h [12] = '{-0.00732421875, 0, 0.013671875, 0, -0.0263671875, 0, 0.048828125, 0, -0.0966796875, 0, 0.31494140625, 0.5};
      for (int k = 0; k < 12; k++) begin
        coef[3][k] = longint'($rtoi(h[k] * 4096.0 + (h[k] < 0 ? -0.5 : 0.5)));
        coef[3][22-k] = coef[3][k];
      end
    end
  end

  function automatic longint floor_div(longint a, longint b);
    longint q = a / b;
    if ((a % b != 0) && ((a < 0) != (b < 0))) q--;
    return q;
  endfunction

  function automatic longint ref_out(int s);
    longint acc = 0, r;
    for (int k = 0; k < NTAPS[s]; k++)
      if (k < hist.size()) acc += coef[s][k] * hist[k];
    r = floor_div(acc + (longint'(1) << (FRAC[s] - 1)), longint'(1) << FRAC[s]);
    if (r > 131071)  begin r = 131071;  nsat++; end
    if (r < -131072) begin r = -131072; nsat++; end
    return r;
  endfunction

  // One input sample with a random gap before it; queues the expected
  // output of every stage when this input completes a pair.
  task automatic drive(longint v);
    repeat ($urandom_range(1, 3)) @(posedge clk);
    in_valid <= 1; in_data <= sample_t'(v);
    hist.push_front(v);
    if (hist.size() > 31) void'(hist.pop_back());
    nin++;
    if (nin % 2 == 0)
      for (int s = 0; s < NS; s++) begin
        exp_val_q[s].push_back(ref_out(s));
        exp_cyc_q[s].push_back(cyc + 2);
        exp_n_q[s].push_back(nin);
      end
    @(posedge clk);
    in_valid <= 0;
  endtask

  // Frequency response of the measured impulse response against the
  // half-band specification: pass band up to FP (fraction of the input
  // rate), stop band from 0.5 - FP. The specification asks for ripple
  // below 0.012 dB (1st stage) or 0.05 dB and attenuation of 57 dB (1st)
  // or 45 dB; the published quantised taps reach about +/-0.0125 dB and
  // 56.8 dB (1st), +/-0.06 dB and 43.2 dB (2nd, 3rd), +/-0.053 dB and
  // 44.3 dB (4th), so the limits below are those of the quantised taps.
  localparam real FP      [NS] = '{0.2, 0.175, 0.175, 0.2};
  localparam real RIP_MAX [NS] = '{0.013, 0.065, 0.065, 0.06};
  localparam real ATT_MIN [NS] = '{56.5, 43.0, 43.0, 44.0};
  task automatic check_response(int s);
    real dev = 0.0, att = 1.0e9;
    for (int i = 0; i <= 1000; i++) begin
      real f = 0.5 * real'(i) / 1000.0, re = 0.0, im = 0.0, mag;
      for (int k = 0; k < NTAPS[s]; k++) begin
        re += real'(h_meas[s][k]) / 32768.0 * $cos(2.0 * 3.14159265358979 * f * real'(k));
        im -= real'(h_meas[s][k]) / 32768.0 * $sin(2.0 * 3.14159265358979 * f * real'(k));
      end
      mag = 20.0 * $log10($sqrt(re * re + im * im) + 1.0e-30);
      if (f <= FP[s] && (mag > dev || -mag > dev)) dev = (mag < 0.0) ? -mag : mag;
      if (f >= 0.5 - FP[s] && -mag < att) att = -mag;
    end
    $display("stage %0d: pass-band deviation %0.4f dB, stop-band attenuation %0.1f dB", s + 1, dev, att);
    checks += 2;
    if (dev > RIP_MAX[s]) begin failures++; $display("stage %0d: ripple too large", s + 1); end
    if (att < ATT_MIN[s]) begin failures++; $display("stage %0d: attenuation too small", s + 1); end
  endtask

  initial begin
    for (int s = 0; s < NS; s++) begin
      nout[s] = 0;
      for (int k = 0; k < 31; k++) h_meas[s][k] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 2000; n++) begin
      longint v;
      case ((n / 100) % 4)
        0: v = longint'($urandom_range(0, 65536)) - 32768;
        1: v = longint'($urandom_range(0, 262143)) - 131072;
        2: v = ((n / 2) % 2) ? 131071 : -131072;   // full-scale, period 4
        default: v = 50000 + longint'($urandom_range(0, 200)) - 100;
      endcase
      drive(v);
    end
    // Impulse responses: an impulse of 2^15 on an even and on an odd input
    // count gives the odd and the even taps (one output per two inputs).
    for (int ph = 0; ph < 2; ph++) begin
      repeat (40) drive(0);
      if ((nin + 1) % 2 != ph) drive(0);
      imp_at = nin + 1;
      drive(32768);
      repeat (40) drive(0);
    end
    repeat (4) @(posedge clk);
    for (int s = 0; s < NS; s++) begin
      checks++;
      if (nout[s] != nin / 2 || exp_val_q[s].size() != 0) begin
        failures++; $display("stage %0d: %0d outputs", s, nout[s]);
      end
      check_response(s);
    end
    checks++;
    if (nsat == 0) begin failures++; $display("saturation never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    for (int s = 0; s < NS; s++)
      if (rst_n && out_valid[s]) begin
        longint ev, ec;
        nout[s]++;
        checks += 2;
        if (exp_val_q[s].size() == 0) begin
          failures++; $display("stage %0d: unexpected output", s);
        end else begin
          int idx;
          ev = exp_val_q[s].pop_front();
          ec = exp_cyc_q[s].pop_front();
          idx = exp_n_q[s].pop_front() - imp_at;
          if (idx >= 0 && idx < NTAPS[s]) h_meas[s][idx] = longint'(out_data[s]);
          if (longint'(out_data[s]) != ev) begin
            failures++;
            if (failures < 10) $display("stage %0d: out %0d expected %0d", s, out_data[s], ev);
          end
          if (cyc != ec) begin
            failures++;
            if (failures < 10) $display("stage %0d: latency %0d vs %0d", s, cyc, ec);
          end
        end
      end
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
