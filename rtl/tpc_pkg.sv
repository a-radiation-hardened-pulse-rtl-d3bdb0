// Shared timing constants of the temporally pulse clocked TMR flip-flop
// (TPC-TMR-FF).
//
// The flip-flop is a timing circuit: its protection against single event
// transients (SETs) comes from spacing three sampling pulses further apart
// than the longest transient it has to survive. These constants carry the
// nominal numbers of the 90 nm implementation (typical corner, 25 C) so that
// the behavioural delay models, the RTL and the testbenches agree on them.
// All times are integer picoseconds.
package tpc_pkg;
  timeunit 1ps;
  timeprecision 1ps;

  // Propagation delay of one delay element (delta). Pulses PCLKA, PCLKB and
  // PCLKC follow the rising clock edge by 1, 2 and 3 delta.
  localparam int unsigned DELTA_PS = 600;

  // Width of each pulse from a pulse generator.
  localparam int unsigned PULSE_WIDTH_PS = 180;

  // Longest SET the flip-flop is designed to filter. The gap between one
  // pulse's falling edge and the next pulse's rising edge,
  // DELTA_PS - PULSE_WIDTH_PS = 420 ps, must be at least this long so that one
  // transient can touch at most one sampling pulse.
  localparam int unsigned SET_WIDTH_PS = 400;

  // Number of bits that share one temporal pulse generator in the multi-bit
  // cell.
  localparam int unsigned FF_BITS = 16;

endpackage
