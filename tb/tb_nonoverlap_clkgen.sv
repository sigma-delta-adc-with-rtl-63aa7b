// tb_nonoverlap_clkgen: checks the four-phase clock generator model.
// A 640 kHz clock is applied. At every simulation step p1 and p2 must
// never be high together, nor p1 with p2d or p2 with p1d. In the middle of
// each half period p1/p1d must be high while the clock is low and p2/p2d
// while it is high, and every complement output must be the inverse of its
// phase. The delayed phases must lag their phases, and each phase must
// pulse once per clock period.
//
// Source and choices: The phase names and the non-overlap property follow the source design;
// the gate delays of the model are this design's.
`timescale 1ns / 1ps
module tb_nonoverlap_clkgen;
  logic clk = 0;
  logic p1, p1_b, p1d, p1d_b, p2, p2_b, p2d, p2d_b;
  int checks = 0, failures = 0, overlap = 0, n_p1 = 0, n_p2 = 0;
  realtime t_p1_rise, lag_sum = 0;
  int n_lag = 0;

  nonoverlap_clkgen dut (.*);

  always #781.25 clk = ~clk;

  always @(p1 or p2 or p1d or p2d)
    if ((p1 && p2) || (p1 && p2d) || (p2 && p1d)) overlap++;

  always @(posedge p1) begin n_p1++; t_p1_rise = $realtime; end
  always @(posedge p2) n_p2++;
  always @(posedge p1d) if (n_p1 > 0) begin lag_sum += $realtime - t_p1_rise; n_lag++; end

  initial begin
    #3000;
    for (int n = 0; n < 200; n++) begin
      @(negedge clk); #390;
      checks += 3;
      if (!(p1 && p1d && !p2 && !p2d)) begin failures++; $display("clk low: phases wrong"); end
      if (p1_b !== ~p1 || p1d_b !== ~p1d) begin failures++; $display("p1 complements wrong"); end
      if (p2_b !== ~p2 || p2d_b !== ~p2d) begin failures++; $display("p2 complements wrong"); end
      @(posedge clk); #390;
      checks += 2;
      if (!(p2 && p2d && !p1 && !p1d)) begin failures++; $display("clk high: phases wrong"); end
      if (p2_b !== ~p2 || p2d_b !== ~p2d) begin failures++; $display("p2 complements wrong"); end
    end
    checks += 3;
    if (overlap != 0) begin failures++; $display("phases overlapped %0d times", overlap); end
    if (n_p1 < 200 || n_p1 > 203 || n_p2 < 200 || n_p2 > 203) begin
      failures++; $display("pulse counts %0d %0d", n_p1, n_p2);
    end
    if (n_lag == 0 || lag_sum / n_lag <= 0.0) begin failures++; $display("p1d does not lag p1"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2ms;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
