// Self-checking testbench for delay_element.
//
// Drives the input with random edges on a 10 ps grid, including pulses much
// shorter than the delay, and keeps its own record of the input sampled on
// a 5 ps-offset grid. At every sample point the output must equal the input
// as it was exactly DELAY_PS earlier (transport delay: no pulse may be
// swallowed, shortened or moved). Also checks that a 400 ps transient, the
// design SET width, passes through with its width intact.
module tb_delay_element;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned DELAY_PS = 600;
  localparam int unsigned STEP_PS  = 10;
  localparam int unsigned LAG      = DELAY_PS / STEP_PS;
  localparam int unsigned NSTEPS   = 4000;

  logic a = 1'b0;
  logic y;
  bit   stim_done = 1'b0;
  int   checks = 0;
  int   failures = 0;

  delay_element #(.DELAY_PS(DELAY_PS)) dut (.a(a), .y(y));

  // Input history on the sampling grid, newest at index 0.
  logic [LAG:0] hist = '0;

  // Stimulus: change a on the 10 ps grid after random gaps of 1..80 steps.
  initial begin
    int gap;
    #(2 * DELAY_PS);
    while (!stim_done) begin
      gap = 1 + int'($urandom_range(79));
      #(gap * STEP_PS);
      if (!stim_done) a = ~a;
    end
  end

  // Reference and comparison, 5 ps after each grid point.
  initial begin
    #(STEP_PS / 2);
    for (int i = 0; i < NSTEPS * 2; i++) begin
      hist = {hist[LAG-1:0], a};
      if (i >= int'(LAG)) begin
        checks++;
        if (y !== hist[LAG]) begin
          failures++;
          if (failures < 10)
            $display("ERROR t=%0t y=%b expected %b", $time, y, hist[LAG]);
        end
      end
      #(STEP_PS);
    end

    // A 400 ps transient keeps its width.
    stim_done = 1'b1;
    begin
      time t_rise, t_fall;
      a = 1'b0;
      #(2 * DELAY_PS);
      a = 1'b1;
      #400;
      a = 1'b0;
      @(posedge y) t_rise = $time;
      @(negedge y) t_fall = $time;
      checks++;
      if (t_fall - t_rise != 400 || t_rise == 0) begin
        failures++;
        $display("ERROR transient width %0t, expected 400", t_fall - t_rise);
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Watchdog.
  initial begin
    #(STEP_PS * NSTEPS * 3);
    failures++;
    $display("ERROR watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
