// TMR latch bank (window B of the flip-flop) for WIDTH bits.
//
// Every bit has three latches, LA, LB and LC, all fed from the same D input
// and opened by the three pulses PCLKA, PCLKB and PCLKC respectively. Their
// outputs QA, QB and QC go to a non-inverting majority voter that drives Q.
// Because the pulses are delta apart, a transient on D, on one pulse clock or
// on one latch's storage node corrupts at most one copy, and the voter masks
// it. Two copies wrong at once (for example a missing PCLKC together with an
// upset of QB) produce a wrong Q.
//
// Interface: pclk_a, pclk_b, pclk_c (in); d (in, WIDTH); q (out, WIDTH).
// Timing: without faults Q takes the new value when PCLKB opens LB (the
// second agreeing copy) and is settled by PCLKB's falling edge. D must be
// stable from before PCLKA rises until PCLKB falls without SETs, and until
// PCLKC falls to ride out one.
module tmr_latch_bank #(
  parameter int unsigned WIDTH = tpc_pkg::FF_BITS
) (
  input  logic             pclk_a,
  input  logic             pclk_b,
  input  logic             pclk_c,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  timeunit 1ps;
  timeprecision 1ps;

  logic [WIDTH-1:0] qa, qb, qc;

  pulse_latch #(.WIDTH(WIDTH)) u_la (.pclk(pclk_a), .d(d), .q(qa));
  pulse_latch #(.WIDTH(WIDTH)) u_lb (.pclk(pclk_b), .d(d), .q(qb));
  pulse_latch #(.WIDTH(WIDTH)) u_lc (.pclk(pclk_c), .d(d), .q(qc));

  majority_voter #(.WIDTH(WIDTH)) u_vote (.a(qa), .b(qb), .c(qc), .y(q));
endmodule
