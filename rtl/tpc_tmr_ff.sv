// TPC-TMR-FF: multi-bit, radiation hardened, temporally pulse clocked
// triple modular redundant D flip-flop.
//
// One temporal pulse generator, shared by all WIDTH bits, turns each rising
// edge of clk into three short pulses PCLKA, PCLKB and PCLKC that follow the
// edge by delta, 2 delta and 3 delta. Every bit samples D into three pulse
// latches, one per pulse, and a majority voter gives Q. Hardening:
//  * a transient on D lasting less than the 420 ps gap between pulses can be
//    caught by at most one of the three latches;
//  * a transient on the clock or a delayed clock is stopped by the Muller
//    C-elements of the pulse generator;
//  * a lost or shifted pulse, or an upset of one latch, spoils one copy only.
// Sharing the pulse generator amortises its three delay elements over the
// word; the default of 16 bits is the size of the laid-out cell.
//
// Interface: clk (in), d (in, WIDTH), q (out, WIDTH). No reset (none in the
// original design); Q is defined after the first clock edge.
// Timing at the defaults (DELTA_PS = 600, PULSE_WIDTH_PS = 180):
//  setup : D stable before PCLKA rises, i.e. clk rise + 600 ps;
//  hold  : until PCLKB falls (clk + 1380 ps) without SETs, until PCLKC falls
//          (clk + 1980 ps) to tolerate an SET on the pulse clocks;
//  clk->Q: Q settles when PCLKB opens the second latch (clk + 1200 ps plus
//          latch and voter delay, zero in this model), one delta later if
//          PCLKA was lost to an SET;
//  clock : high and low phases each longer than 3 delta (1.8 ns).
// Structure and numbers follow the original design; the zero-delay latches and
// C-elements are this model's simplification.
module tpc_tmr_ff #(
  parameter int unsigned WIDTH          = tpc_pkg::FF_BITS,
  parameter int unsigned DELTA_PS       = tpc_pkg::DELTA_PS,
  parameter int unsigned PULSE_WIDTH_PS = tpc_pkg::PULSE_WIDTH_PS
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  timeunit 1ps;
  timeprecision 1ps;

  logic pclk_a, pclk_b, pclk_c;

  // One SET may overlap at most one sampling pulse only if the gap between
  // pulses is at least the SET width the cell is designed for.
  initial begin
    assert (DELTA_PS >= PULSE_WIDTH_PS + tpc_pkg::SET_WIDTH_PS)
      else $warning("pulse gap %0d ps is shorter than the %0d ps design SET",
                    DELTA_PS - PULSE_WIDTH_PS, tpc_pkg::SET_WIDTH_PS);
  end

  temporal_pulse_generator #(
    .DELTA_PS       (DELTA_PS),
    .PULSE_WIDTH_PS (PULSE_WIDTH_PS)
  ) u_tpg (
    .clk    (clk),
    .pclk_a (pclk_a),
    .pclk_b (pclk_b),
    .pclk_c (pclk_c)
  );

  tmr_latch_bank #(.WIDTH(WIDTH)) u_bank (
    .pclk_a (pclk_a),
    .pclk_b (pclk_b),
    .pclk_c (pclk_c),
    .d      (d),
    .q      (q)
  );
endmodule
