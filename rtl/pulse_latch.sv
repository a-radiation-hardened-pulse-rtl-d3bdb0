// Pulse latch: WIDTH-bit latch transparent while its pulse clock is high.
//
// In the flip-flop each of the three redundant copies LA, LB and LC of every
// bit is such a latch, opened by its own short pulse (PCLKA, PCLKB, PCLKC).
// While `pclk` is high `q` follows `d`; while it is low `q` holds. Data must
// be stable for the whole pulse; the value present at the pulse's falling edge
// is the one kept.
//
// Interface: pclk (in), d (in, WIDTH), q (out, WIDTH). No reset: the
// original latch has none, so q is unknown until the first pulse.
// The latch is intended (it is the storage element of the flip-flop).
module pulse_latch #(
  parameter int unsigned WIDTH = tpc_pkg::FF_BITS
) (
  input  logic             pclk,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  timeunit 1ps;
  timeprecision 1ps;

  always_latch begin
    if (pclk) q = d;
  end
endmodule
