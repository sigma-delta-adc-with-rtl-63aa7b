// tb_spi_slave: self-checking test of the SPI slave (CPOL = 1, CPHA = 1).
// A master model drives SCLK idling high, changes MOSI on falling edges and
// samples MISO on rising edges. Each frame sends a random word to the
// slave and must read back the word presented on tx_word, MSB first. Mode
// writes (bit 15 set) must change the mode; plain words must not. MISO
// must not change on the falling edge of ss_n, only on SCLK falling edges.
//
// Source and choices: Mode 3 follows the source design; the 16-bit frame and the mode-write
// command are this design's choices.
`timescale 1ns / 1ps
module tb_spi_slave;
  import adc_pkg::*;

  logic rst_n = 1, sclk = 1, ss_n = 1, mosi = 0;
  logic miso, miso_oe;
  logic [15:0] tx_word = '0, rx_word;
  logic rx_toggle;
  mode_e mode_q;
  int checks = 0, failures = 0, nmode = 0;

  spi_slave #(.WIDTH(16)) dut (.*);

  localparam realtime TH = 500ns;  // half SCLK period

  task automatic frame(input logic [15:0] mo, output logic [15:0] mi);
    logic miso_at_ss;
    ss_n = 0;
    #(TH);
    miso_at_ss = miso;
    for (int i = 15; i >= 0; i--) begin
      sclk = 0;
      mosi = mo[i];
      #(TH);
      sclk = 1;
      mi[i] = miso;
      #(TH);
    end
    ss_n = 1;
    #(TH);
    checks++;
    if (miso_at_ss !== 1'b0) begin
      failures++; $display("MISO changed on ss_n");
    end
  endtask

  initial begin
    mode_e exp_mode = MODE_BIO_ELECTRIC;
    #10ns rst_n = 0;
    #100ns rst_n = 1;
    #1us;
    for (int n = 0; n < 200; n++) begin
      logic [15:0] mo, mi, tw;
      logic tog;
      tw = 16'($urandom());
      mo = 16'($urandom());
      if (n % 5 == 0) mo[15] = 1'b1;
      tx_word = tw;
      tog = rx_toggle;
      frame(mo, mi);
      checks += 4;
      if (mi !== tw) begin failures++; $display("read %h expected %h", mi, tw); end
      if (rx_word !== mo) begin failures++; $display("rx %h expected %h", rx_word, mo); end
      if (rx_toggle === tog) begin failures++; $display("rx_toggle not flipped"); end
      if (mo[15]) begin
        if (mode_e'(mo[0]) != exp_mode) nmode++;
        exp_mode = mode_e'(mo[0]);
      end
      if (mode_q !== exp_mode) begin failures++; $display("mode %0d expected %0d", mode_q, exp_mode); end
      checks++;
      if (miso_oe !== 1'b0) begin failures++; $display("MISO driven while deselected"); end
    end
    checks++;
    if (nmode == 0) begin failures++; $display("mode never changed"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10ms;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
