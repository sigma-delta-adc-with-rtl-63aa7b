// tb_sin_comp: self-checking test of the sine compensator.
// Random, full-range and alternating full-scale samples are applied with
// random gaps. Every second input must produce an output one clock later,
// equal to the 9-tap convolution with (-1 + 6z^-1 - z^-2)^4 (expanded here
// by repeated polynomial multiplication), rounded over 256 and saturated.
//
// Source and choices: The filter follows the four-stage sine compensator; the rounding,
// saturation and strobe timing checked here are this design's choices.
`timescale 1ns / 1ps
module tb_sin_comp;
  import adc_pkg::*;

  localparam int NS = 1;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  sample_t in_data = '0;
  logic    out_valid [NS];
  sample_t out_data  [NS];
  int checks = 0, failures = 0, nsat = 0;
  longint cyc = 0;

  sin_comp u_0 (.clk, .rst_n, .in_valid, .in_data, .out_valid(out_valid[0]), .out_data(out_data[0]));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  localparam int NTAPS [NS] = '{9};
  localparam int FRAC  [NS] = '{8};
  longint coef [NS][31];
  longint hist [$];
  longint exp_val_q [NS][$];
  longint exp_cyc_q [NS][$];
  int nin = 0;
  int nout [NS];

  initial begin
    longint p [31], q [31];
    foreach (p[k]) p[k] = (k == 0);
    repeat (4) begin
      foreach (q[k]) q[k] = -p[k] + ((k >= 1) ? 6 * p[k-1] : 0) - ((k >= 2) ? p[k-2] : 0);
      p = q;
    end
    coef[0] = p;
    if (p[3] != -936 || p[4] != 1734) $display("reference taps wrong");
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

  initial begin
    for (int s = 0; s < NS; s++) nout[s] = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 2000; n++) begin
      longint v;
      repeat ($urandom_range(1, 3)) @(posedge clk);
      case ((n / 100) % 4)
        0: v = longint'($urandom_range(0, 65536)) - 32768;
        1: v = longint'($urandom_range(0, 262143)) - 131072;
        2: v = ((n / 2) % 2) ? 131071 : -131072;   // full-scale, period 4
        default: v = 50000 + longint'($urandom_range(0, 200)) - 100;
      endcase
      in_valid <= 1; in_data <= sample_t'(v);
      hist.push_front(v);
      if (hist.size() > 31) void'(hist.pop_back());
      nin++;
      if (nin % 2 == 0)
        for (int s = 0; s < NS; s++) begin
          exp_val_q[s].push_back(ref_out(s));
          exp_cyc_q[s].push_back(cyc + 2);
        end
      @(posedge clk);
      in_valid <= 0;
    end
    repeat (4) @(posedge clk);
    for (int s = 0; s < NS; s++) begin
      checks++;
      if (nout[s] != 2000 / 2 || exp_val_q[s].size() != 0) begin
        failures++; $display("stage %0d: %0d outputs", s, nout[s]);
      end
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
          ev = exp_val_q[s].pop_front();
          ec = exp_cyc_q[s].pop_front();
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
