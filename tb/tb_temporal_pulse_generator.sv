// Self-checking testbench for temporal_pulse_generator.
//
// Clock: 6 ns period, 3 ns high, so each phase is longer than 3 delta.
// Reference: after a clean rising clock edge at time tr, PCLKA must be high
// exactly in [tr+delta, tr+delta+PW), PCLKB in [tr+2delta, ...) and PCLKC in
// [tr+3delta, ...), and all three low elsewhere. The outputs are compared with
// this on a 10 ps grid (offset 5 ps) over every cycle.
// Every other cycle a 400 ps single event transient is injected on one clock
// node, cycling through: a low glitch on CLK in its high phase (type 3), a
// high glitch on CLK in its low phase (type 4), and low and high glitches on
// each of D1CLK, D2CLK and D3CLK. The C-elements must filter all of them, so
// the reference pulses stay the same and no extra pulse appears. Each kind of
// transient is counted and must have been applied.
module tb_temporal_pulse_generator;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned DELTA   = 600;
  localparam int unsigned PW      = 180;
  localparam int unsigned SET_W   = 400;
  localparam int unsigned PERIOD  = 6000;
  localparam int unsigned NCYCLES = 40;
  localparam int unsigned NKINDS  = 8;

  logic clk = 1'b0;
  logic pclk_a, pclk_b, pclk_c;
  int   checks = 0, failures = 0;
  int   applied [NKINDS];
  int   n_a = 0, n_b = 0, n_c = 0;

  temporal_pulse_generator #(.DELTA_PS(DELTA), .PULSE_WIDTH_PS(PW)) dut (
    .clk(clk), .pclk_a(pclk_a), .pclk_b(pclk_b), .pclk_c(pclk_c)
  );

  always @(posedge pclk_a) n_a++;
  always @(posedge pclk_b) n_b++;
  always @(posedge pclk_c) n_c++;

  function automatic logic in_pulse(longint t, longint tr, int k);
    longint s;
    s = tr + longint'(k) * longint'(DELTA);
    return (t >= s) && (t < s + longint'(PW));
  endfunction

  // Transient injection on a clock node; kind selects node and polarity.
  task automatic inject(int kind, longint tr);
    unique case (kind)
      0: begin  // type 3: CLK low during its high phase
        #(tr + 2300 - longint'($time)); clk = 1'b0; #(SET_W); clk = 1'b1;
      end
      1: begin  // type 4: CLK high during its low phase
        #(tr + 3300 - longint'($time)); clk = 1'b1; #(SET_W); clk = 1'b0;
      end
      2: begin  // D1CLK low during its high phase
        #(tr + 1000 - longint'($time));
        force dut.d1clk = 1'b0; #(SET_W); release dut.d1clk;
      end
      3: begin  // D1CLK high during its low phase (CLK low)
        #(tr + 4000 - longint'($time));
        force dut.d1clk = 1'b1; #(SET_W); release dut.d1clk;
      end
      4: begin  // D2CLK low during its high phase
        #(tr + 1600 - longint'($time));
        force dut.d2clk = 1'b0; #(SET_W); release dut.d2clk;
      end
      5: begin  // D2CLK high during its low phase
        #(tr + 4500 - longint'($time));
        force dut.d2clk = 1'b1; #(SET_W); release dut.d2clk;
      end
      6: begin  // D3CLK low during its high phase
        #(tr + 2200 - longint'($time));
        force dut.d3clk = 1'b0; #(SET_W); release dut.d3clk;
      end
      default: begin  // D3CLK high during its low phase
        #(tr + 5100 - longint'($time));
        force dut.d3clk = 1'b1; #(SET_W); release dut.d3clk;
      end
    endcase
    applied[kind]++;
  endtask

  // Clock and transients.
  initial begin
    foreach (applied[i]) applied[i] = 0;
    #(PERIOD);
    for (int c = 0; c < int'(NCYCLES); c++) begin
      longint tr;
      tr = longint'($time);
      clk = 1'b1;
      if (c >= 2 && (c % 2) == 1) begin
        fork
          inject((c / 2) % int'(NKINDS), tr);
        join_none
      end
      #(PERIOD / 2);
      clk = 1'b0;
      #(PERIOD / 2);
    end
  end

  // Reference comparison from the third cycle on.
  initial begin
    #(3 * PERIOD + 5);
    for (int c = 2; c < int'(NCYCLES) - 1; c++) begin
      longint tr;
      tr = longint'(c + 1) * longint'(PERIOD);
      for (int s = 0; s < int'(PERIOD / 10); s++) begin
        longint t;
        t = longint'($time);
        checks++;
        if (pclk_a !== in_pulse(t, tr, 1) || pclk_b !== in_pulse(t, tr, 2)
            || pclk_c !== in_pulse(t, tr, 3)) begin
          failures++;
          if (failures < 10)
            $display("ERROR t=%0t (cycle edge %0d) pclk a/b/c=%b%b%b", t, tr, pclk_a, pclk_b, pclk_c);
        end
        #10;
      end
    end
    // One pulse per clock edge on each output, and every transient kind seen.
    checks++;
    if (n_a != n_b || n_b != n_c || n_a != int'(NCYCLES) - 1) begin
      failures++;
      $display("ERROR pulse counts a=%0d b=%0d c=%0d for %0d edges", n_a, n_b, n_c, NCYCLES - 1);
    end
    foreach (applied[i]) begin
      checks++;
      if (applied[i] == 0) begin
        failures++;
        $display("ERROR transient kind %0d never applied", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(longint'(PERIOD) * longint'(NCYCLES + 5));
    failures++;
    $display("ERROR watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
