// Delay element (behavioural model, not synthesizable logic).
//
// In silicon this is a chain of four inverters with load capacitors between
// the stages and long channel lengths, giving a non-inverting propagation
// delay delta of 600 ps. It has no logic function beyond the delay, so it is
// modelled here: every change of `a` reappears on `y` exactly DELAY_PS later
// (transport delay). A transient on the input therefore passes through with
// its width intact, as the clock glitch does in the transistor-level
// simulation of the flip-flop; an inertial delay would swallow it and make
// the SET tests meaningless.
//
// Implementation: every input change launches its own short-lived process
// that waits DELAY_PS and then writes the value it saw, so several changes
// can be in flight at once. The output starts low, which matches a clock net
// that is idle low at power-up.
//
// Interface: a (in), y (out). Timing: y(t) = a(t - DELAY_PS).
// The 600 ps default is the original cell's post-layout delay; the model has no rise/fall asymmetry
// and no SET recovery behaviour, which the real cell was sized for.
module delay_element #(
  parameter int unsigned DELAY_PS = tpc_pkg::DELTA_PS
) (
  input  logic a,
  output logic y
);
  timeunit 1ps;
  timeprecision 1ps;

  logic y_q;

  initial begin
    y_q = 1'b0;
    forever begin
      @(a);
      fork
        begin : launch
          automatic logic v = a;
          #(DELAY_PS) y_q = v;
        end
      join_none
    end
  end

  assign y = y_q;
endmodule
