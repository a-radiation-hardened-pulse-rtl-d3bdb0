// Temporal pulse generator (window A of the flip-flop): three sampling pulses
// per rising clock edge, spaced by delta, with clock transients filtered.
//
// Structure (as in the original schematic):
//   CLK --[delta]--> D1CLK --[delta]--> D2CLK --[delta]--> D3CLK
//   CA = C(CLK, D1CLK) -> PGA -> PCLKA
//   CB = C(CLK, D2CLK) -> PGB -> PCLKB
//   CC = C(CLK, D3CLK) -> PGC -> PCLKC
// Each Muller C-element rises only when both the clock and its delayed copy
// are high, i.e. delta, 2 delta and 3 delta after the clock edge, and falls
// only when both are low. A transient on CLK (or on one of the delayed
// copies) shorter than delta is seen by at most one input of each C-element
// at a time and is held off, so no extra or missing pulse results. Each
// C-element output drives a pulse generator that emits a PULSE_WIDTH_PS pulse
// on its rising edge. In silicon the three pulses are buffered to drive all
// the latches of the multi-bit cell; buffers carry no logic and are plain
// wires here.
//
// Interface: clk (in); pclk_a, pclk_b, pclk_c (out).
// Timing (no SET): pclk_a is high from clk rise + DELTA_PS for PULSE_WIDTH_PS,
// pclk_b from + 2*DELTA_PS, pclk_c from + 3*DELTA_PS. The clock's high and low
// phases must each last longer than 3*DELTA_PS (1.8 ns at the default), or CC
// never sees both inputs agree; this limit is derived here, the original design does
// not state it. This module is a behavioural timing model because its delay
// elements and pulse generators are.
module temporal_pulse_generator #(
  parameter int unsigned DELTA_PS       = tpc_pkg::DELTA_PS,
  parameter int unsigned PULSE_WIDTH_PS = tpc_pkg::PULSE_WIDTH_PS
) (
  input  logic clk,
  output logic pclk_a,
  output logic pclk_b,
  output logic pclk_c
);
  timeunit 1ps;
  timeprecision 1ps;

  logic d1clk, d2clk, d3clk;   // clock delayed by 1, 2 and 3 delta
  logic ca, cb, cc;            // C-element outputs

  delay_element #(.DELAY_PS(DELTA_PS)) u_dly1 (.a(clk),   .y(d1clk));
  delay_element #(.DELAY_PS(DELTA_PS)) u_dly2 (.a(d1clk), .y(d2clk));
  delay_element #(.DELAY_PS(DELTA_PS)) u_dly3 (.a(d2clk), .y(d3clk));

  muller_c u_ca (.a(clk), .b(d1clk), .y(ca));
  muller_c u_cb (.a(clk), .b(d2clk), .y(cb));
  muller_c u_cc (.a(clk), .b(d3clk), .y(cc));

  pulse_generator #(.PULSE_WIDTH_PS(PULSE_WIDTH_PS)) u_pga (.clk(ca), .pclk(pclk_a));
  pulse_generator #(.PULSE_WIDTH_PS(PULSE_WIDTH_PS)) u_pgb (.clk(cb), .pclk(pclk_b));
  pulse_generator #(.PULSE_WIDTH_PS(PULSE_WIDTH_PS)) u_pgc (.clk(cc), .pclk(pclk_c));
endmodule
