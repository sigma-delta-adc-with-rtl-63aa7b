// tb_cic_filter: self-checking test of the sinc^4 CIC stage.
// A random bit stream (with long all-ones and all-zeros runs to reach both
// ends of the range) is fed one bit every second clock. A reference FIR
// whose 61 taps are built here by convolving a 16-long box with itself
// three times is evaluated on the same history, and each output must match
// it exactly. The number of bits between outputs (the decimation) and the
// one-clock latency are checked too.
//
// Source and choices: The tap values follow from the sinc^4, R = 16 transfer function; the
// one-clock latency and the strobe interface are this design's.
`timescale 1ns / 1ps
module tb_cic_filter;
  import adc_pkg::*;

  logic clk = 0, rst_n = 0;
  logic bit_valid = 0, bit_in = 0;
  logic out_valid;
  logic [CIC_W-1:0] out_data;
  int checks = 0, failures = 0;

  cic_filter #(.DEC(4)) dut (.*);

  always #5 clk = ~clk;

  int  ref_c [61];
  logic hist [$];
  int  bits_since = 0, nout = 0;
  longint cyc = 0;
  longint exp_val_q [$], exp_cyc_q [$];

  initial begin
    int tmp [61];
    for (int i = 0; i < 61; i++) ref_c[i] = (i < 16) ? 1 : 0;
    repeat (3) begin
      for (int i = 0; i < 61; i++) begin
        tmp[i] = 0;
        for (int j = 0; j < 16; j++) if (i - j >= 0) tmp[i] += ref_c[i-j];
      end
      ref_c = tmp;
    end
    if (ref_c[30] != 2736 || ref_c[11] != 364 || ref_c[15] != 816) begin
      failures++; $display("reference taps wrong");
    end
  end

  function automatic longint ref_out();
    longint s = 0;
    for (int k = 0; k < 61; k++)
      if (k < hist.size() && hist[k]) s += ref_c[k];
    return s;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 4000; n++) begin
      logic b;
      @(posedge clk);
      if (n < 300)       b = $urandom_range(0, 1);
      else if (n < 500)  b = 1;          // all ones: 65536
      else if (n < 700)  b = 0;          // all zeros: 0
      else if (n < 1000) b = ($urandom_range(0, 9) < 8);
      else               b = $urandom_range(0, 1);
      bit_valid <= 1; bit_in <= b;
      hist.push_front(b);
      if (hist.size() > 61) void'(hist.pop_back());
      bits_since++;
      if (bits_since == 4) begin
        bits_since = 0; exp_val_q.push_back(ref_out()); exp_cyc_q.push_back(cyc + 2);
      end
      @(posedge clk);
      bit_valid <= 0;
    end
    repeat (4) @(posedge clk);
    checks++;
    if (nout != 1000 || exp_val_q.size() != 0) begin failures++; $display("output count %0d", nout); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // The output appears the clock after the bit that completes it: the bit
  // is driven after edge c, sampled at edge c+1, and out_valid is seen at
  // edge c+2.
  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      nout++;
      checks += 2;
      if (exp_val_q.size() == 0) begin
        failures++; $display("unexpected output");
      end else begin
        longint ev, ec;
        ev = exp_val_q.pop_front();
        ec = exp_cyc_q.pop_front();
        if (longint'(out_data) != ev) begin
          failures++;
          if (failures < 10) $display("out %0d expected %0d", out_data, ev);
        end
        if (cyc != ec) begin
          failures++;
          if (failures < 10) $display("latency: output at %0d expected %0d", cyc, ec);
        end
      end
    end
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
