// Simultaneous dual-fault analysis of tpc_tmr_ff (default parameters).
//
// Reproduces the 7 x 4 matrix of double strikes: one 400 ps SET on a node of
// the pulse generator (CLK, D1CLK, D2CLK, D3CLK, PCLKA, PCLKB, PCLKC) together
// with one strike on the data side (a transient on D, or an upset of the
// stored value QA, QB or QC). Expected outcome per pair (1 = Q wrong), the
// matrix the cell's layout rules were derived from:
//            D  QA QB QC
//   CLK      0  0  0  0
//   D1CLK    0  0  0  0
//   D2CLK    0  1  1  0
//   D3CLK    0  1  1  0
//   PCLKA    0  0  1  1
//   PCLKB    0  1  0  1
//   PCLKC    0  1  1  0
// Strike models, relative to the rising clock edge at tr (data of the cycle
// held until tr+2050 ps, just past the SET-tolerant hold time; the next word
// is the complement, so every stale or early copy is wrong in every bit):
//   CLK    : high glitch in the low phase (type 4) at tr+3300;
//   D1CLK  : low glitch in its high phase at tr+1000;
//   D2CLK  : low SET at its rising edge, tr+1200..1600: PCLKB is 400 ps late
//            (still correct) and, through D3CLK, PCLKC is late enough to take
//            the next word;
//   D3CLK  : low SET at its rising edge, tr+1800..2200: PCLKC takes the next
//            word;
//   PCLKx  : low SET over the pulse, which is lost: the latch keeps the last
//            cycle's word;
//   D      : 400 ps SET in the 420 ps gap between PCLKA and PCLKB;
//   QA..QC : all bits of one latch flipped at tr+2500.
// Q is checked at tr+2700 and tr+5900; a clean cycle follows every pair and
// must give the right word again.
module tb_dual_fault_table;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned WIDTH = tpc_pkg::FF_BITS;
  localparam int unsigned SET_W = tpc_pkg::SET_WIDTH_PS;

  // Expected failures, rows CLK..PCLKC, columns D, QA, QB, QC.
  localparam bit [3:0] EXPECT_FAIL [7] = '{
    4'b0000, 4'b0000, 4'b0110, 4'b0110, 4'b0011, 4'b0101, 4'b0110
  };
  // Bit 3 of each row is column D, bit 0 is column QC.

  logic             clk = 1'b0;
  logic [WIDTH-1:0] d, q, cur_w, next_w, flip_w;
  int checks = 0, failures = 0, n_fail_seen = 0, n_pairs = 0;
  string row_name [7] = '{"CLK", "D1CLK", "D2CLK", "D3CLK", "PCLKA", "PCLKB", "PCLKC"};
  string col_name [4] = '{"D", "QA", "QB", "QC"};

  tpc_tmr_ff dut (.clk(clk), .d(d), .q(q));

  task automatic check(logic [WIDTH-1:0] expect_q, string what);
    checks++;
    if (q !== expect_q) begin
      failures++;
      $display("ERROR %s t=%0t q=%h expected %h", what, $time, q, expect_q);
    end
  endtask

  // One cycle with faults row/col (-1 = none). Starts at the rising edge.
  task automatic run_cycle(int row, int col);
    logic fail_expected;
    fail_expected = (row >= 0 && col >= 0) ? EXPECT_FAIL[row][3 - col] : 1'b0;
    fork
      begin  // clock
        clk = 1'b1;
        #3000 clk = 1'b0;
        #300;
        if (row == 0) begin clk = 1'b1; #(SET_W); clk = 1'b0; #(2700 - SET_W); end
        else #2700;
      end
      begin  // data
        if (col == 0) begin #790; d = ~cur_w; #(SET_W); d = cur_w; #(1260 - SET_W); end
        else #2050;
        d = next_w;
      end
      begin  // pulse generator strike
        unique case (row)
          1: begin #1000; force dut.u_tpg.d1clk = 1'b0; #(SET_W); release dut.u_tpg.d1clk; end
          2: begin #1200; force dut.u_tpg.d2clk = 1'b0; #(SET_W); release dut.u_tpg.d2clk; end
          3: begin #1800; force dut.u_tpg.d3clk = 1'b0; #(SET_W); release dut.u_tpg.d3clk; end
          4: begin #550;  force dut.pclk_a = 1'b0; #(SET_W); release dut.pclk_a; end
          5: begin #1150; force dut.pclk_b = 1'b0; #(SET_W); release dut.pclk_b; end
          6: begin #1750; force dut.pclk_c = 1'b0; #(SET_W); release dut.pclk_c; end
          default: ;
        endcase
      end
      begin  // latch upset
        #2500;
        unique case (col)
          1: begin flip_w = ~dut.u_bank.u_la.q; force dut.u_bank.u_la.q = flip_w; #50 release dut.u_bank.u_la.q; end
          2: begin flip_w = ~dut.u_bank.u_lb.q; force dut.u_bank.u_lb.q = flip_w; #50 release dut.u_bank.u_lb.q; end
          3: begin flip_w = ~dut.u_bank.u_lc.q; force dut.u_bank.u_lc.q = flip_w; #50 release dut.u_bank.u_lc.q; end
          default: ;
        endcase
      end
      begin  // checks
        #2700;
        if (row >= 0 && col >= 0) begin
          n_pairs++;
          checks++;
          if ((q !== cur_w) != fail_expected) begin
            failures++;
            $display("ERROR %s + %s: Q %s, expected %s", row_name[row], col_name[col],
                     (q === cur_w) ? "correct" : "wrong", fail_expected ? "wrong" : "correct");
          end
          if (q !== cur_w) n_fail_seen++;
          #3200;
          checks++;
          if ((q !== cur_w) != fail_expected) begin
            failures++;
            $display("ERROR %s + %s at end of cycle", row_name[row], col_name[col]);
          end
        end else begin
          check(cur_w, "clean cycle");
          #3200 check(cur_w, "clean cycle, end");
        end
      end
    join
    cur_w  = next_w;
    next_w = ~cur_w;
  endtask

  initial begin
    cur_w  = WIDTH'($urandom);
    next_w = ~cur_w;
    d      = cur_w;
    #6000;
    // Power-up: settle the latches and C-elements with a constant word.
    next_w = cur_w;
    run_cycle(-1, -1);
    next_w = ~cur_w;
    run_cycle(-1, -1);
    for (int r = 0; r < 7; r++) begin
      for (int c = 0; c < 4; c++) begin
        run_cycle(r, c);
        run_cycle(-1, -1);
      end
    end
    checks++;
    if (n_pairs != 28 || n_fail_seen != 10) begin
      failures++;
      $display("ERROR %0d pairs run, %0d failed (expected 28 and 10)", n_pairs, n_fail_seen);
    end
    $display("dual-fault pairs: %0d, outputs corrupted: %0d", n_pairs, n_fail_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(80 * 6000);
    failures++;
    $display("ERROR watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
