// Muller C-element, non-inverting.
//
// When both inputs agree the output takes their value; when they differ the
// output keeps its last value. In the flip-flop's pulse generator one input is
// the clock and the other a copy delayed by one or more delta, so the output
// only rises once the clock has been high on both paths and only falls once it
// has been low on both: a glitch shorter than the delay reaches only one input
// at a time and is held off.
//
// It is written as a latch whose enable is "inputs equal" and whose data is
// input a; that is the state-holding behaviour of the transistor circuit.
// The latch inferred here is intended (it is the C-element's memory). The
// output is not reset: after power-up it is unknown until the inputs first
// agree, which the clock does within one delay of starting.
//
// Interface: a, b (in), y (out). Timing: zero delay in this model.
// The original design specifies the behaviour (non-inverting, hold on disagreement); the
// latch formulation is this design's.
module muller_c (
  input  logic a,
  input  logic b,
  output logic y
);
  timeunit 1ps;
  timeprecision 1ps;

  always_latch begin
    if (a == b) y = a;
  end
endmodule
