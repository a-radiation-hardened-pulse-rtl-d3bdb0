// Majority voter: bitwise, non-inverting 2-of-3 vote.
//
// Each output bit is the value that at least two of the three inputs agree
// on, so a wrong value in any single copy is outvoted. The transistor-level
// voter is a three-branch complex gate whose branches conduct on the input
// pairs (A,B), (A,C) and (B,C); that gate is inverting, while the flip-flop
// uses a non-inverting voter to drive Q. Here: y = ab | ac | bc.
//
// Interface: a, b, c (in, WIDTH), y (out, WIDTH). Purely combinational.
module majority_voter #(
  parameter int unsigned WIDTH = tpc_pkg::FF_BITS
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic [WIDTH-1:0] c,
  output logic [WIDTH-1:0] y
);
  timeunit 1ps;
  timeprecision 1ps;

  always_comb begin
    y = (a & b) | (a & c) | (b & c);
  end
endmodule
