// Self-checking testbench for pulse_latch.
//
// Applies 180 ps pulses on pclk while the data changes randomly, both while
// the latch is open and while it is closed. Reference: while pclk is high q
// must equal d; while it is low q must equal the value d had when pclk last
// fell. Data is also changed inside a pulse to check transparency.
module tb_pulse_latch;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned WIDTH = 16;

  logic             pclk = 1'b0;
  logic [WIDTH-1:0] d, q, held;
  int checks = 0, failures = 0;

  pulse_latch #(.WIDTH(WIDTH)) dut (.pclk(pclk), .d(d), .q(q));

  task automatic check(logic [WIDTH-1:0] expect_q, string what);
    checks++;
    if (q !== expect_q) begin
      failures++;
      if (failures < 10) $display("ERROR %s t=%0t q=%h expected %h", what, $time, q, expect_q);
    end
  endtask

  initial begin
    d = WIDTH'($urandom);
    #100;
    for (int i = 0; i < 500; i++) begin
      // Open the latch with a 180 ps pulse, changing d in the middle.
      pclk = 1'b1;
      #50;
      check(d, "open");
      d = WIDTH'($urandom);
      #50;
      check(d, "open after change");
      #80;
      held = d;
      pclk = 1'b0;
      #10;
      // Closed: d changes must not pass.
      repeat (3) begin
        d = WIDTH'($urandom);
        #100;
        check(held, "closed");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("ERROR watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
