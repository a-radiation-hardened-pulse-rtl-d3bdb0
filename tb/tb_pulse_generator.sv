// Self-checking testbench for pulse_generator.
//
// Drives the clock input with random high and low phases of 200..1000 ps on
// a 10 ps grid and checks, on a 5 ps-offset grid, that pclk is high exactly
// for the first PULSE_WIDTH_PS after every rising edge: pclk(t) must equal
// clk(t) AND NOT clk(t - PULSE_WIDTH_PS). It also counts pulses against
// rising edges and checks that no pulse follows a falling edge.
module tb_pulse_generator;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned PW_PS   = 180;
  localparam int unsigned STEP_PS = 10;
  localparam int unsigned LAG     = PW_PS / STEP_PS;
  localparam int unsigned NSTEPS  = 20000;

  logic clk = 1'b0;
  logic pclk;
  int   checks = 0, failures = 0;
  int   n_rise = 0, n_pulse = 0;

  logic [LAG:0] hist = '0;

  pulse_generator #(.PULSE_WIDTH_PS(PW_PS)) dut (.clk(clk), .pclk(pclk));

  initial begin
    #1000;
    forever begin
      #(STEP_PS * (20 + $urandom_range(80)));
      clk = ~clk;
      if (clk) n_rise++;
    end
  end

  always @(posedge pclk) n_pulse++;

  initial begin
    #(STEP_PS / 2);
    for (int i = 0; i < int'(NSTEPS); i++) begin
      hist = {hist[LAG-1:0], clk};
      if (i > int'(LAG)) begin
        checks++;
        if (pclk !== (hist[0] & ~hist[LAG])) begin
          failures++;
          if (failures < 10)
            $display("ERROR t=%0t pclk=%b clk=%b clk(t-%0d)=%b", $time, pclk, hist[0], PW_PS, hist[LAG]);
        end
        // Never high while the clock is low.
        checks++;
        if (pclk && !clk) failures++;
      end
      #(STEP_PS);
    end
    checks++;
    if (n_pulse != n_rise || n_rise < 10) begin
      failures++;
      $display("ERROR %0d pulses for %0d rising edges", n_pulse, n_rise);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(STEP_PS * NSTEPS * 2);
    failures++;
    $display("ERROR watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
