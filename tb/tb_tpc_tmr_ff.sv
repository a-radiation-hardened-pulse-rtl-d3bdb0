// End-to-end testbench for tpc_tmr_ff at its default parameters (16 bits,
// delta = 600 ps, 180 ps pulses).
//
// Clock: 6 ns period, 3 ns high. Data: a new random word is applied 2.1 ns
// after each rising edge, i.e. after PCLKC has fallen (the hold time that
// tolerates an SET) and long before the next PCLKA (setup).
// Every cycle applies one "mechanism" and checks Q against the word that was
// applied, worked out in the testbench:
//   0  no fault: Q still old at clk+1190 ps, new by clk+1390 ps (the fall of
//      PCLKB), i.e. clk->Q of two delta;
//   1  SET type 1 on CLK: the clock rises 400 ps early;
//   2  SET type 2 on CLK: the clock rises 400 ps late;
//   3  SET type 3 on CLK: 400 ps low glitch in the high phase (filtered);
//   4  SET type 4 on CLK: 400 ps high glitch in the low phase (filtered);
//   5  400 ps SET on D over PCLKA: only LA takes the wrong value, and Q
//      settles one delta later (at PCLKC);
//   6  400 ps SET on D between PCLKA and PCLKB: no latch takes it;
//   7-9  PCLKA / PCLKB / PCLKC lost to an SET; with PCLKA or PCLKB lost Q
//      is still old at clk+1390 ps and new by clk+2050 ps (clk->Q grows by
//      delta);
//   10 upset of one stored bit in LA, LB or LC (rotating);
//   11 400 ps SET on D1CLK, D2CLK or D3CLK (rotating, filtered);
//   12 900 ps SET on D covering PCLKA and PCLKB: beyond the 400 ps design
//      limit, two copies are wrong and Q must show the corrupted word.
// The "Q still old at clk+1190 ps" check is skipped after a cycle that left
// one latch copy different from the others: the first pulse of the next
// cycle can then make two copies agree early and move Q before PCLKB.
// Each mechanism is counted; one that never happened counts as a failure.
// The number of pulses on each pulse clock is checked against the number of
// clock edges minus the pulses that were deliberately removed.
module tb_tpc_tmr_ff;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned WIDTH  = tpc_pkg::FF_BITS;
  localparam int unsigned SET_W  = tpc_pkg::SET_WIDTH_PS;
  localparam int          NMECH  = 13;
  localparam int          ROUNDS = 4;

  logic             clk = 1'b0;
  logic [WIDTH-1:0] d = '0;
  logic [WIDTH-1:0] q;
  logic [WIDTH-1:0] prev_w, cur_w, next_w, flip_w;

  int checks = 0, failures = 0;
  bit copies_agree = 1'b1;
  int mech_count [NMECH];
  int n_edges = 0, lost_a = 0, lost_b = 0, lost_c = 0;
  int n_a = 0, n_b = 0, n_c = 0;

  tpc_tmr_ff dut (.clk(clk), .d(d), .q(q));

  always @(posedge dut.pclk_a) n_a++;
  always @(posedge dut.pclk_b) n_b++;
  always @(posedge dut.pclk_c) n_c++;

  task automatic check(logic [WIDTH-1:0] expect_q, string what, int mech);
    checks++;
    if (q !== expect_q) begin
      failures++;
      if (failures < 20)
        $display("ERROR mech %0d %s t=%0t q=%h expected %h", mech, what, $time, q, expect_q);
    end
  endtask

  // One clock cycle. Starts 1 ns before the rising edge tr, ends at tr+5 ns.
  task automatic run_cycle(int mech, int sub);
    fork
      // Clock, with CLK transients of types 1 to 4.
      begin
        #600;                                   // tr - 400
        if (mech == 1) clk = 1'b1;
        #400;                                   // tr
        if (mech == 2) #(SET_W);
        clk = 1'b1;
        n_edges++;
        if (mech == 2) #(2300 - SET_W); else #2300;
        if (mech == 3) begin clk = 1'b0; #(SET_W); clk = 1'b1; #(700 - SET_W); end
        else #700;                              // tr + 3000
        clk = 1'b0;
        #300;                                   // tr + 3300
        if (mech == 4) begin clk = 1'b1; #(SET_W); clk = 1'b0; #(1700 - SET_W); end
        else #1700;                             // tr + 5000
      end
      // Data and D transients.
      begin
        #1000;                                  // tr
        if (mech == 5) begin #500; d = ~cur_w; #(SET_W); d = cur_w; #(1600 - 500 - SET_W); end
        else if (mech == 6) begin #790; d = ~cur_w; #(SET_W); d = cur_w; #(1600 - 790 - SET_W); end
        else if (mech == 12) begin #500; d = ~cur_w; #900; d = cur_w; #200; end
        else #1600;                             // tr + 1600
        #500;                                   // tr + 2100
        d = next_w;
      end
      // Faults inside the cell.
      begin
        #1000;                                  // tr
        unique case (mech)
          7: begin #550; force dut.pclk_a = 1'b0; #(SET_W); release dut.pclk_a; lost_a++; end
          8: begin #1150; force dut.pclk_b = 1'b0; #(SET_W); release dut.pclk_b; lost_b++; end
          9: begin #1750; force dut.pclk_c = 1'b0; #(SET_W); release dut.pclk_c; lost_c++; end
          10: begin
            #2500;
            flip_w = cur_w ^ (WIDTH'(1) << ((sub * 5) % WIDTH));
            unique case (sub % 3)
              0: begin force dut.u_bank.u_la.q = flip_w; #50 release dut.u_bank.u_la.q; end
              1: begin force dut.u_bank.u_lb.q = flip_w; #50 release dut.u_bank.u_lb.q; end
              default: begin force dut.u_bank.u_lc.q = flip_w; #50 release dut.u_bank.u_lc.q; end
            endcase
          end
          11: begin
            unique case (sub % 3)
              0: begin #1000; force dut.u_tpg.d1clk = 1'b0; #(SET_W); release dut.u_tpg.d1clk; end
              1: begin #1600; force dut.u_tpg.d2clk = 1'b0; #(SET_W); release dut.u_tpg.d2clk; end
              default: begin #2200; force dut.u_tpg.d3clk = 1'b0; #(SET_W); release dut.u_tpg.d3clk; end
            endcase
          end
          default: ;
        endcase
      end
      // Checks.
      begin
        #1000;                                  // tr
        #1190;
        if (mech != 1 && copies_agree) check(prev_w, "Q before second pulse", mech);
        #200;                                   // tr + 1390
        if (mech == 7) check(prev_w, "Q one delta later with PCLKA lost", mech);
        else if (mech == 8) check(prev_w, "Q one delta later with PCLKB lost", mech);
        else if (mech == 5) check(prev_w, "Q one delta later with LA hit by the D SET", mech);
        else if (mech == 2) check(prev_w, "Q with late clock", mech);
        else if (mech == 12) check(~cur_w, "Q corrupted by an over-long SET", mech);
        else check(cur_w, "Q after PCLKB", mech);
        #660;                                   // tr + 2050
        if (mech == 12) check(~cur_w, "Q corrupted by an over-long SET", mech);
        else check(cur_w, "Q after PCLKC", mech);
        #2850;                                  // tr + 4900
        if (mech == 12) check(~cur_w, "Q held", mech);
        else check(cur_w, "Q held through the low phase", mech);
      end
    join
    mech_count[mech]++;
    // Faults that leave one copy different from the other two at the end of
    // the cycle (a late or missing PCLKB/PCLKC, an upset, a double fault)
    // let the first pulse of the next cycle move Q early, bit by bit.
    copies_agree = !(mech inside {2, 8, 9, 10, 12});
    prev_w = cur_w;
    cur_w  = next_w;
    next_w = WIDTH'($urandom);
  endtask

  initial begin
    foreach (mech_count[i]) mech_count[i] = 0;
    // Power-up: two clock edges with a constant word settle every latch and
    // C-element.
    cur_w  = WIDTH'($urandom);
    d      = cur_w;
    next_w = cur_w;
    prev_w = cur_w;
    #1000;
    repeat (2) begin
      #1000 clk = 1'b1; #3000 clk = 1'b0; #2000;
    end
    next_w = WIDTH'($urandom);
    checks++;
    if (q !== cur_w) begin
      failures++;
      $display("ERROR after power-up q=%h expected %h", q, cur_w);
    end
    // Each run_cycle begins 1 ns before its rising edge.
    for (int r = 0; r < ROUNDS; r++) begin
      for (int m = 0; m < NMECH; m++) begin
        run_cycle(m, r * NMECH + m);
        run_cycle(0, 0);
      end
    end
    for (int m = 0; m < NMECH; m++) begin
      checks++;
      if (mech_count[m] == 0) begin
        failures++;
        $display("ERROR mechanism %0d never happened", m);
      end
    end
    checks++;
    if (n_a != n_edges + 2 - lost_a || n_b != n_edges + 2 - lost_b || n_c != n_edges + 2 - lost_c) begin
      failures++;
      $display("ERROR pulses a=%0d b=%0d c=%0d for %0d edges (lost %0d/%0d/%0d)",
               n_a, n_b, n_c, n_edges + 2, lost_a, lost_b, lost_c);
    end
    $display("mechanisms:");
    foreach (mech_count[i]) $display("  %0d: %0d cycles", i, mech_count[i]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(longint'(ROUNDS * NMECH * 2 + 10) * 6000);
    failures++;
    $display("ERROR watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
