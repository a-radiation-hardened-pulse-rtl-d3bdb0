// Shift register built from tpc_tmr_ff cells: the hold-time workload.
//
// The cell's Q changes as soon as two latch copies hold the new word, at the
// second pulse (2 delta after CLK), while the third latch of the next cell
// still samples at 3 delta. A cell therefore needs delay between its Q and
// the next cell's D, the hold buffer. Three 3-stage shift registers (16 bits
// per stage, default cell parameters) run side by side from one clock and
// one input word stream:
//   chain 0: stages wired directly. The second stage's LB and LC latches
//            take the first stage's new word in the same cycle, so the
//            register collapses: stage 2 shows stage 1's word. This is the
//            hold violation, and the test checks that it happens.
//   chain 1: a delta (600 ps) hold buffer per bit between stages. The
//            second stage shifts correctly, but its LC latch takes the next
//            word (it opens exactly when that word arrives), so only two
//            good copies remain and there is no SET margin. Worse, in the
//            next cycle PCLKA then makes LA agree with LC one delta early,
//            the second stage's Q moves at delta instead of 2 delta, and the
//            third stage races through. The test checks the second stage,
//            counts the LC mismatches and checks that the third stage
//            collapses: with zero-delay latches one delta of buffer is not
//            enough.
//   chain 2: a delta + pulse width + 20 ps (800 ps) buffer. The register
//            shifts and all three copies of every stage agree.
// Latches, C-elements and the voter have no delay in this model; in silicon
// their delays add to the buffer.
module tb_shift_register;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned WIDTH  = tpc_pkg::FF_BITS;
  localparam int unsigned DELTA  = tpc_pkg::DELTA_PS;
  localparam int unsigned PW     = tpc_pkg::PULSE_WIDTH_PS;
  localparam int unsigned STAGES = 3;
  localparam int          NCYC   = 40;
  localparam int unsigned HOLD_DLY [3] = '{0, DELTA, DELTA + PW + 20};

  logic             clk = 1'b0;
  logic [WIDTH-1:0] d_in = '0;
  logic [WIDTH-1:0] hist [STAGES];
  int checks = 0, failures = 0;
  int collapsed = 0, collapsed_c1 = 0, lc_mismatch = 0, copies_disagree_c2 = 0;

  // stage_q[chain][stage], stage_d[chain][stage]
  logic [WIDTH-1:0] stage_q [3][STAGES];
  logic [WIDTH-1:0] stage_d [3][STAGES];

  for (genvar ch = 0; ch < 3; ch++) begin : g_chain
    for (genvar s = 0; s < int'(STAGES); s++) begin : g_stage
      if (s == 0) begin : g_first
        assign stage_d[ch][s] = d_in;
      end else if (ch == 0) begin : g_direct
        assign stage_d[ch][s] = stage_q[ch][s-1];
      end else begin : g_buffered
        for (genvar b = 0; b < int'(WIDTH); b++) begin : g_bit
          delay_element #(.DELAY_PS(HOLD_DLY[ch])) u_hold (
            .a (stage_q[ch][s-1][b]),
            .y (stage_d[ch][s][b])
          );
        end
      end
      tpc_tmr_ff u_ff (.clk(clk), .d(stage_d[ch][s]), .q(stage_q[ch][s]));
    end
  end

  initial begin
    foreach (hist[i]) hist[i] = '0;
    d_in = '0;
    // Fill every stage with zeros first (clean start for all copies).
    repeat (STAGES + 1) begin
      #1000 clk = 1'b1; #3000 clk = 1'b0; #2000;
    end
    for (int n = 0; n < NCYC; n++) begin
      logic [WIDTH-1:0] w;
      // Word for this edge, applied in the previous low phase.
      w = WIDTH'($urandom);
      d_in = w;
      for (int i = int'(STAGES) - 1; i > 0; i--) hist[i] = hist[i-1];
      hist[0] = w;
      #1000 clk = 1'b1;
      #2500;                       // tr + 2500: all pulses done
      // Chain 2 shifts through all stages, chain 1 through the first two:
      // stage s holds the word of s edges ago.
      for (int ch = 1; ch < 3; ch++) begin
        for (int s = 0; s < ((ch == 1) ? 2 : int'(STAGES)); s++) begin
          checks++;
          if (n >= s && stage_q[ch][s] !== hist[s]) begin
            failures++;
            if (failures < 10)
              $display("ERROR chain %0d stage %0d q=%h expected %h", ch, s, stage_q[ch][s], hist[s]);
          end
        end
      end
      // Chain 0 collapses: stage 1 already shows this edge's word.
      if (stage_q[0][1] === w && hist[1] !== w) collapsed++;
      // Chain 1's third stage shows the second stage's word of this edge.
      if (n >= 2 && stage_q[1][2] === hist[1] && hist[2] !== hist[1]) collapsed_c1++;
      // Third copy of stage 1 in chains 1 and 2.
      if (g_chain[1].g_stage[1].u_ff.u_bank.qc !== g_chain[1].g_stage[1].u_ff.u_bank.qa)
        lc_mismatch++;
      if (g_chain[2].g_stage[1].u_ff.u_bank.qc !== g_chain[2].g_stage[1].u_ff.u_bank.qa
          || g_chain[2].g_stage[1].u_ff.u_bank.qb !== g_chain[2].g_stage[1].u_ff.u_bank.qa)
        copies_disagree_c2++;
      #500 clk = 1'b0;
      #2000;
    end
    checks++;
    if (collapsed < NCYC / 2) begin
      failures++;
      $display("ERROR direct chain collapsed in only %0d of %0d cycles", collapsed, NCYC);
    end
    checks++;
    if (lc_mismatch < NCYC / 2) begin
      failures++;
      $display("ERROR delta buffer: LC took the next word in only %0d cycles", lc_mismatch);
    end
    checks++;
    if (collapsed_c1 < NCYC / 2) begin
      failures++;
      $display("ERROR delta buffer: third stage raced in only %0d cycles", collapsed_c1);
    end
    checks++;
    if (copies_disagree_c2 != 0) begin
      failures++;
      $display("ERROR 800 ps buffer: copies disagreed in %0d cycles", copies_disagree_c2);
    end
    $display("direct chain collapsed in %0d/%0d cycles; delta buffer: LC wrong in %0d, third stage raced in %0d; 800 ps buffer: copies disagreed in %0d",
             collapsed, NCYC, lc_mismatch, collapsed_c1, copies_disagree_c2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(longint'(NCYC + STAGES + 10) * 6000);
    failures++;
    $display("ERROR watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
