// Pulse generator (behavioural model, not synthesizable logic).
//
// Converts each rising edge of `clk` into one pulse on `pclk` of width
// PULSE_WIDTH_PS (180 ps, three inverter delays in silicon). A falling edge
// gives no pulse. Internally an inverted copy of the clock, delayed by the
// pulse width, is formed (dclkn); pclk is high while clk is high and dclkn is
// still high, which is the waveform relation between CLK, DCLKN and PCLK of
// the classic pulse generator. The inverter chain is modelled by a transport
// delay_element.
//
// Interface: clk (in), pclk (out). Timing: pclk rises with clk (no gate delay
// modelled) and falls PULSE_WIDTH_PS later; the input high phase must be at
// least PULSE_WIDTH_PS long for a full pulse.
// The 180 ps pulse width is the original cell's nominal value; the zero-delay
// gating is this model's simplification.
module pulse_generator #(
  parameter int unsigned PULSE_WIDTH_PS = tpc_pkg::PULSE_WIDTH_PS
) (
  input  logic clk,
  output logic pclk
);
  timeunit 1ps;
  timeprecision 1ps;

  logic clk_dly;  // clock after the odd inverter chain, before inversion
  logic dclkn;    // delayed, inverted clock

  delay_element #(.DELAY_PS(PULSE_WIDTH_PS)) u_chain (
    .a (clk),
    .y (clk_dly)
  );

  assign dclkn = ~clk_dly;
  assign pclk  = clk & dclkn;
endmodule
