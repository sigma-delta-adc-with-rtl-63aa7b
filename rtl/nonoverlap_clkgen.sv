// nonoverlap_clkgen: behavioural model of the modulator's four-phase
// non-overlapping clock generator (a gate-level analog-timing circuit, not
// synthesizable logic).
//
// Structure, as in the transistor design: two cross-coupled NOR gates, one
// fed by CLK and one by the inverted CLK, each followed by an inverter
// chain. The first taps of the chains give p1 and p2 and their
// complements; later taps, a further delay down the chain, give the
// delayed phases p1d and p2d and their complements. Each NOR takes the
// other chain's delayed phase as its second input, so a phase can only
// rise after the other chain's delayed phase has fallen: p1 and p2 never
// overlap, and p1d/p2d fall after p1/p2.
//
// p1 is high while CLK is low, p2 while CLK is high. The delays are
// parameters in ns; their values are this model's choice (a few gate
// delays each).
`timescale 1ns / 1ps

module nonoverlap_clkgen #(
  parameter realtime T_NOR   = 0.3ns,  // NOR gate
  parameter realtime T_INV   = 0.2ns,  // CLK inverter
  parameter realtime T_PHASE = 0.4ns,  // NOR output to p tap
  parameter realtime T_DELAY = 1.0ns,  // p tap to pd tap
  parameter realtime T_BAR   = 0.1ns   // tap to its complement
) (
  input  logic clk,
  output logic p1,
  output logic p1_b,
  output logic p1d,
  output logic p1d_b,
  output logic p2,
  output logic p2_b,
  output logic p2d,
  output logic p2d_b
);
  logic clk_b, nor1, nor2;

  assign #(T_INV)   clk_b = ~clk;
  assign #(T_NOR)   nor1  = ~(clk   | p2d);
  assign #(T_NOR)   nor2  = ~(clk_b | p1d);
  assign #(T_PHASE) p1    = nor1;
  assign #(T_PHASE) p2    = nor2;
  assign #(T_DELAY) p1d   = p1;
  assign #(T_DELAY) p2d   = p2;
  assign #(T_BAR)   p1_b  = ~p1;
  assign #(T_BAR)   p2_b  = ~p2;
  assign #(T_BAR)   p1d_b = ~p1d;
  assign #(T_BAR)   p2d_b = ~p2d;

endmodule
