// Self-checking testbench for tmr_latch_bank.
//
// Drives the three pulse clocks directly, as the pulse generator would
// (pulses of 180 ps, 600 ps apart), with new random data each cycle, and
// checks the voted output against a reference that tracks the three copies:
//  * after PCLKA alone Q must still hold the old word (only one new copy);
//  * after PCLKB Q must be the new word; after PCLKC as well.
// Then single faults are injected: a missing pulse on one of the three
// clocks, or an upset of one latch's stored word (a forced, then released,
// bit flip). Q must stay correct. Finally two copies are spoiled at once
// (PCLKC missing and LB upset), and Q must show the wrong word: the voter
// cannot mask a double fault.
module tb_tmr_latch_bank;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned WIDTH = 16;
  localparam int unsigned DELTA = 600;
  localparam int unsigned PW    = 180;

  logic pclk_a = 1'b0, pclk_b = 1'b0, pclk_c = 1'b0;
  logic [WIDTH-1:0] d, q, cur, prev, flip;
  int checks = 0, failures = 0;
  int n_missing = 0, n_upset = 0, n_double = 0;

  tmr_latch_bank #(.WIDTH(WIDTH)) dut (
    .pclk_a(pclk_a), .pclk_b(pclk_b), .pclk_c(pclk_c), .d(d), .q(q)
  );

  task automatic check(logic [WIDTH-1:0] expect_q, string what);
    checks++;
    if (q !== expect_q) begin
      failures++;
      if (failures < 10) $display("ERROR %s t=%0t q=%h expected %h", what, $time, q, expect_q);
    end
  endtask

  // One flip-flop cycle. skip selects a pulse that is lost (0..2, or -1).
  task automatic cycle(int skip);
    #(DELTA - PW);
    if (skip != 0) pclk_a = 1'b1;
    #(PW) pclk_a = 1'b0;
    #(DELTA - PW);
    if (skip != 1) pclk_b = 1'b1;
    #(PW) pclk_b = 1'b0;
    #(DELTA - PW);
    if (skip != 2) pclk_c = 1'b1;
    #(PW) pclk_c = 1'b0;
    #(DELTA);
  endtask

  initial begin
    // Load a known word into all three copies.
    d = WIDTH'($urandom);
    cycle(-1);
    cur = d;
    check(cur, "initial load");

    // Normal cycles, with Q observed between the pulses.
    for (int i = 0; i < 200; i++) begin
      prev = cur;
      d    = WIDTH'($urandom);
      cur  = d;
      #(DELTA - PW);
      pclk_a = 1'b1; #(PW) pclk_a = 1'b0;
      #10 check(prev, "after PCLKA only");
      #(DELTA - PW - 10);
      pclk_b = 1'b1; #(PW) pclk_b = 1'b0;
      #10 check(cur, "after PCLKB");
      #(DELTA - PW - 10);
      pclk_c = 1'b1; #(PW) pclk_c = 1'b0;
      #10 check(cur, "after PCLKC");
      #(DELTA - 10);
    end

    // A missing pulse on one clock is masked.
    for (int i = 0; i < 60; i++) begin
      d = WIDTH'($urandom);
      cycle(i % 3);
      cur = d;
      n_missing++;
      check(cur, "one pulse missing");
      cycle(-1);
      check(cur, "recovery");
    end

    // An upset of one latch's stored word is masked.
    for (int i = 0; i < 60; i++) begin
      d = WIDTH'($urandom);
      cycle(-1);
      cur  = d;
      flip = cur ^ (WIDTH'(1) << (i % WIDTH));
      unique case (i % 3)
        0: begin force dut.u_la.q = flip; #50 release dut.u_la.q; end
        1: begin force dut.u_lb.q = flip; #50 release dut.u_lb.q; end
        default: begin force dut.u_lc.q = flip; #50 release dut.u_lc.q; end
      endcase
      n_upset++;
      #100 check(cur, "one latch upset");
    end

    // Double fault: PCLKC lost and LB upset -> Q is wrong.
    for (int i = 0; i < 10; i++) begin
      d = WIDTH'($urandom);
      cycle(-1);
      prev = d;
      d = ~prev;
      cycle(2);          // LA, LB take ~prev; LC keeps prev
      flip = prev;       // upset LB back to prev as well
      force dut.u_lb.q = flip; #50 release dut.u_lb.q;
      n_double++;
      #100 check(prev, "double fault outvotes the good copy");
    end

    checks++;
    if (n_missing == 0 || n_upset == 0 || n_double == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("ERROR watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
