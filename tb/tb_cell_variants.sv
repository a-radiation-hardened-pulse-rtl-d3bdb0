// Testbench for tpc_tmr_ff in three configurations side by side:
//   u8   8 bits,  delta = 600 ps (the smaller multi-bit group);
//   u16  16 bits, delta = 600 ps (the default cell);
//   uw   16 bits, delta = 900 ps (delay elements scaled up for longer SETs).
// The 8- and 16-bit cells share one temporal pulse generator design and must
// behave identically; the 900 ps cell leaves 900 - 180 = 720 ps between
// pulses and so must tolerate a 700 ps SET that breaks the 600 ps cells.
//
// Clock: 8 ns period, 4 ns high (each phase longer than 3 * 900 ps). A new
// random word is applied 4 ns after each rising edge, after PCLKC of the
// slowest cell has fallen. Each cycle applies one event to all three cells
// (SET widths 400 ps on the 600 ps cells and 700 ps on the 900 ps cell
// unless noted) and checks Q at the end of the cycle:
//   0  none; clk->Q is also checked: Q old just before PCLKB, new after;
//   1  SET on D over the first pulse: LA wrong, Q correct;
//   2  SET on one pulse clock (rotating A, B, C): that pulse lost, Q correct;
//   3  upset of one latch copy in the low phase (rotating): Q correct;
//   4  type 4 SET on CLK (high glitch in the low phase): filtered;
//   5  the same 700 ps SET on D from 700 ps to 1400 ps in every cell: it
//      covers the closing edges of PCLKA and PCLKB of the 600 ps cells, whose
//      Q must show the corrupted word, but only PCLKA of the 900 ps cell.
// The events run in the order 1, 2, 3, 5, 4, 0.
// Each event is counted; one that never happened is a failure.
module tb_cell_variants;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned WN     = 8;
  localparam int unsigned WW     = 16;
  localparam int unsigned DELTA  = tpc_pkg::DELTA_PS;
  localparam int unsigned DELTAW = 900;
  localparam int unsigned SET_N  = tpc_pkg::SET_WIDTH_PS;
  localparam int unsigned SET_W  = 700;
  localparam int          PERIOD = 8000;
  localparam longint      FULL   = longint'(PERIOD);
  localparam longint      HALF   = FULL / 2;
  localparam int          NEV    = 6;
  localparam int          ROUNDS = 6;
  // event 0 follows event 4 so that every copy agrees before its clk->Q check
  localparam int          ORDER [NEV] = '{1, 2, 3, 5, 4, 0};

  logic clk;
  // one clock net per cell so that a clock SET can be applied to each
  wire  clk8  = clk;
  wire  clk16 = clk;
  wire  clkw  = clk;

  logic [WN-1:0] d8 = '0;
  logic [WW-1:0] d16 = '0, dw = '0;
  logic [WN-1:0] q8;
  logic [WW-1:0] q16, qw;
  logic [WW-1:0] prev_w, cur_w, flip16, flipw;
  logic [WN-1:0] flip8;

  int checks = 0, failures = 0;
  int ev_count [NEV];

  tpc_tmr_ff #(.WIDTH(WN)) u8 (.clk(clk8), .d(d8), .q(q8));
  tpc_tmr_ff u16 (.clk(clk16), .d(d16), .q(q16));
  tpc_tmr_ff #(.DELTA_PS(DELTAW)) uw (.clk(clkw), .d(dw), .q(qw));

  initial begin
    clk = 1'b0;
    forever #(PERIOD / 2) clk = ~clk;
  end

  task automatic check(logic [WW-1:0] exp16, logic [WW-1:0] expw, string what);
    checks += 3;
    if (q8 !== exp16[WN-1:0]) begin
      failures++;
      $display("FAIL t=%0t %s: 8-bit q=%h expected %h", $time, what, q8, exp16[WN-1:0]);
    end
    if (q16 !== exp16) begin
      failures++;
      $display("FAIL t=%0t %s: 16-bit q=%h expected %h", $time, what, q16, exp16);
    end
    if (qw !== expw) begin
      failures++;
      $display("FAIL t=%0t %s: 900 ps cell q=%h expected %h", $time, what, qw, expw);
    end
  endtask

  task automatic apply(logic [WW-1:0] w);
    d8  = w[WN-1:0];
    d16 = w;
    dw  = w;
  endtask

  // D SET on every cell: invert all bits from t0 for the given widths
  // (relative to the current time).
  task automatic d_set(int t_n, int w_n, int t_w, int w_w);
    fork
      begin
        #(t_n);
        d8 = ~d8; d16 = ~d16;
        #(w_n);
        d8 = ~d8; d16 = ~d16;
      end
      begin
        #(t_w);
        dw = ~dw;
        #(w_w);
        dw = ~dw;
      end
    join
  endtask

  initial begin
    int ev, sub, rot;
    bit clean;
    longint tr;
    logic [WW-1:0] exp_w;

    // two clock edges with a constant word so that every copy is defined
    prev_w = '0;
    apply(prev_w);
    repeat (2) @(posedge clk);
    cur_w = WW'($urandom);
    #(PERIOD / 2) apply(cur_w);
    clean = 1'b1;
    rot = 0;

    for (int r = 0; r < ROUNDS; r++) begin
      for (int i = 0; i < NEV; i++) begin
        ev = ORDER[i];
        @(posedge clk);
        tr = $time;
        sub = rot % 3;
        exp_w = cur_w;
        case (ev)
          0: begin
            if (clean) begin
              // PCLKB rises at 2 delta: 1200 ps / 1800 ps
              #(2 * DELTA - 100);
              checks += 2;
              if (q16 !== prev_w || q8 !== prev_w[WN-1:0]) begin
                failures++;
                $display("FAIL t=%0t clk->Q: 600 ps cell moved before PCLKB", $time);
              end
              if (qw !== prev_w) begin
                failures++;
                $display("FAIL t=%0t clk->Q: 900 ps cell moved before PCLKB", $time);
              end
              #200;
              checks++;
              if (q16 !== cur_w || q8 !== cur_w[WN-1:0]) begin
                failures++;
                $display("FAIL t=%0t clk->Q: 600 ps cell not new after PCLKB", $time);
              end
              #(2 * (DELTAW - DELTA) - 200);
              checks++;
              if (qw !== prev_w) begin
                failures++;
                $display("FAIL t=%0t clk->Q: 900 ps cell moved before PCLKB", $time);
              end
              #200;
              checks++;
              if (qw !== cur_w) begin
                failures++;
                $display("FAIL t=%0t clk->Q: 900 ps cell not new after PCLKB", $time);
              end
            end
          end
          1: d_set(DELTA - 100, SET_N, DELTAW - 100, SET_W);
          2: begin
            fork
              begin
                #((sub + 1) * DELTA - 100);
                case (sub)
                  0: begin force u8.pclk_a = 1'b0; force u16.pclk_a = 1'b0; end
                  1: begin force u8.pclk_b = 1'b0; force u16.pclk_b = 1'b0; end
                  default: begin force u8.pclk_c = 1'b0; force u16.pclk_c = 1'b0; end
                endcase
                #(SET_N);
                case (sub)
                  0: begin release u8.pclk_a; release u16.pclk_a; end
                  1: begin release u8.pclk_b; release u16.pclk_b; end
                  default: begin release u8.pclk_c; release u16.pclk_c; end
                endcase
              end
              begin
                #((sub + 1) * DELTAW - 100);
                case (sub)
                  0: force uw.pclk_a = 1'b0;
                  1: force uw.pclk_b = 1'b0;
                  default: force uw.pclk_c = 1'b0;
                endcase
                #(SET_W);
                case (sub)
                  0: release uw.pclk_a;
                  1: release uw.pclk_b;
                  default: release uw.pclk_c;
                endcase
              end
            join
          end
          3: begin
            #(PERIOD / 2 + 300);
            case (sub)
              0: begin
                flip8  = u8.u_bank.u_la.q ^ WN'($urandom | 1);
                flip16 = u16.u_bank.u_la.q ^ WW'($urandom | 1);
                flipw  = uw.u_bank.u_la.q ^ WW'($urandom | 1);
                force u8.u_bank.u_la.q = flip8;
                force u16.u_bank.u_la.q = flip16;
                force uw.u_bank.u_la.q = flipw;
                #1;
                release u8.u_bank.u_la.q;
                release u16.u_bank.u_la.q;
                release uw.u_bank.u_la.q;
              end
              1: begin
                flip8  = u8.u_bank.u_lb.q ^ WN'($urandom | 1);
                flip16 = u16.u_bank.u_lb.q ^ WW'($urandom | 1);
                flipw  = uw.u_bank.u_lb.q ^ WW'($urandom | 1);
                force u8.u_bank.u_lb.q = flip8;
                force u16.u_bank.u_lb.q = flip16;
                force uw.u_bank.u_lb.q = flipw;
                #1;
                release u8.u_bank.u_lb.q;
                release u16.u_bank.u_lb.q;
                release uw.u_bank.u_lb.q;
              end
              default: begin
                flip8  = u8.u_bank.u_lc.q ^ WN'($urandom | 1);
                flip16 = u16.u_bank.u_lc.q ^ WW'($urandom | 1);
                flipw  = uw.u_bank.u_lc.q ^ WW'($urandom | 1);
                force u8.u_bank.u_lc.q = flip8;
                force u16.u_bank.u_lc.q = flip16;
                force uw.u_bank.u_lc.q = flipw;
                #1;
                release u8.u_bank.u_lc.q;
                release u16.u_bank.u_lc.q;
                release uw.u_bank.u_lc.q;
              end
            endcase
          end
          4: begin
            #(PERIOD / 2 + 300);
            fork
              begin
                force clk8 = 1'b1; force clk16 = 1'b1;
                #(SET_N);
                release clk8; release clk16;
              end
              begin
                force clkw = 1'b1;
                #(SET_W);
                release clkw;
              end
            join
          end
          default: begin
            d_set(700, SET_W, 700, SET_W);
            exp_w = ~cur_w;
          end
        endcase
        if (ev == 2 || ev == 3) rot++;
        ev_count[ev]++;

        // new word once every pulse of this cycle is over
        if ($time < tr + HALF) #(tr + HALF - $time);
        prev_w = cur_w;
        cur_w = WW'($urandom);
        apply(cur_w);
        #(tr + FULL - 300 - $time);
        // 600 ps cells: corrupted by the 700 ps SET; 900 ps cell: not
        check(exp_w, prev_w, $sformatf("event %0d", ev));
        clean = (ev == 0 || ev == 4);
      end
    end

    for (int e = 0; e < NEV; e++) begin
      checks++;
      $display("event %0d happened %0d times", e, ev_count[e]);
      if (ev_count[e] == 0) begin
        failures++;
        $display("FAIL event %0d never happened", e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(PERIOD * (NEV * ROUNDS + 10));
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
