// Self-checking testbench for muller_c.
//
// Applies random input pairs, one input change at a time and sometimes both,
// and compares the output with a reference C-element: the output equals the
// inputs when they agree and keeps its previous value when they differ.
// Every transition of the truth table (rise only on 11, fall only on 00,
// hold on 01 and 10) is counted and must occur.
module tb_muller_c;
  timeunit 1ps;
  timeprecision 1ps;

  logic a = 1'b0, b = 1'b0, y;
  logic ref_y = 1'b0;
  int   checks = 0, failures = 0;
  int   n_rise = 0, n_fall = 0, n_hold = 0;

  muller_c dut (.a(a), .b(b), .y(y));

  initial begin
    #10;
    checks++;
    if (y !== 1'b0) failures++;
    for (int i = 0; i < 2000; i++) begin
      logic prev;
      int   sel;
      prev = ref_y;
      sel  = int'($urandom_range(2));
      unique case (sel)
        0: a = ~a;
        1: b = ~b;
        default: begin a = 1'($urandom); b = 1'($urandom); end
      endcase
      if (a == b) ref_y = a;
      if (ref_y && !prev) n_rise++;
      if (!ref_y && prev) n_fall++;
      if (a != b) n_hold++;
      #10;
      checks++;
      if (y !== ref_y) begin
        failures++;
        if (failures < 10) $display("ERROR a=%b b=%b y=%b expected %b", a, b, y, ref_y);
      end
    end
    checks++;
    if (n_rise == 0 || n_fall == 0 || n_hold == 0) begin
      failures++;
      $display("ERROR rise=%0d fall=%0d hold=%0d", n_rise, n_fall, n_hold);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("ERROR watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
