// tb_mode_output: self-checking test of the mode multiplexer and output
// quantiser. Both decimator taps are driven with random samples (including
// values beyond full scale) at different moments; in each mode only the
// selected tap may produce words, and each word must hold the mode bit and
// the offset-binary code of the selected sample, computed here as
// clamp(round(s * 2^B / 2^17) + 2^(B-1), 0, 2^B-1) with B = 10 or 8.
//
// Source and choices: The tap selection and resolutions follow the source design; the code
// format and word layout checked here are this design's choices.
`timescale 1ns / 1ps
module tb_mode_output;
  import adc_pkg::*;

  logic clk = 0, rst_n = 0;
  mode_e mode = MODE_BIO_ELECTRIC;
  logic elec_valid = 0, img_valid = 0;
  sample_t elec_data = '0, img_data = '0;
  logic out_valid;
  logic [15:0] out_word;
  int checks = 0, failures = 0, nclip = 0;

  mode_output dut (.*);

  always #5 clk = ~clk;

  function automatic int ref_code(longint s, int b);
    real r = real'(s) * (2.0 ** b) / 131072.0;
    longint c = longint'($floor(r + 0.5)) + (longint'(1) << (b - 1));
    if (c < 0) begin c = 0; nclip++; end
    if (c > (longint'(1) << b) - 1) begin c = (longint'(1) << b) - 1; nclip++; end
    return int'(c);
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 2000; n++) begin
      longint ve, vi;
      logic ue, ui;
      int b;
      mode_e m;
      m  = mode_e'((n / 250) % 2);
      ve = longint'($urandom_range(0, 262143)) - 131072;
      vi = longint'($urandom_range(0, 262143)) - 131072;
      if (n % 7 == 0) ve = longint'($urandom_range(0, 131072)) - 65536;
      ue = $urandom_range(0, 1);
      ui = $urandom_range(0, 1);
      @(posedge clk);
      mode <= m;
      elec_valid <= ue; elec_data <= sample_t'(ve);
      img_valid  <= ui; img_data  <= sample_t'(vi);
      @(posedge clk);
      elec_valid <= 0; img_valid <= 0;
      @(negedge clk);
      checks++;
      if (out_valid !== ((m == MODE_BIO_IMAGE) ? ui : ue)) begin
        failures++; $display("valid wrong, mode %0d", m);
      end
      if (out_valid) begin
        b = (m == MODE_BIO_IMAGE) ? 8 : 10;
        checks++;
        if (out_word !== {m, 5'b0, 10'(ref_code((m == MODE_BIO_IMAGE) ? vi : ve, b))}) begin
          failures++;
          if (failures < 10) $display("word %h mode %0d", out_word, m);
        end
      end
    end
    checks++;
    if (nclip == 0) begin failures++; $display("clipping never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
