// Self-checking testbench for majority_voter.
//
// First every bit sees all eight input combinations (the inputs are walked
// through 000..111 on all bits at once), then random vectors are applied. The
// reference counts, per bit, how many inputs are 1 and expects 1 when at
// least two are, so the output is checked to be the non-inverting majority.
module tb_majority_voter;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned WIDTH = 16;

  logic [WIDTH-1:0] a, b, c, y, expect_y;
  int checks = 0, failures = 0;

  majority_voter #(.WIDTH(WIDTH)) dut (.a(a), .b(b), .c(c), .y(y));

  function automatic logic [WIDTH-1:0] vote(logic [WIDTH-1:0] x0, logic [WIDTH-1:0] x1,
                                            logic [WIDTH-1:0] x2);
    logic [WIDTH-1:0] r;
    for (int i = 0; i < int'(WIDTH); i++) begin
      int ones;
      ones = int'(x0[i]) + int'(x1[i]) + int'(x2[i]);
      r[i] = (ones >= 2);
    end
    return r;
  endfunction

  task automatic apply_and_check();
    #10;
    expect_y = vote(a, b, c);
    checks++;
    if (y !== expect_y) begin
      failures++;
      if (failures < 10) $display("ERROR a=%h b=%h c=%h y=%h expected %h", a, b, c, y, expect_y);
    end
  endtask

  initial begin
    for (int k = 0; k < 8; k++) begin
      a = {WIDTH{k[2]}};
      b = {WIDTH{k[1]}};
      c = {WIDTH{k[0]}};
      apply_and_check();
    end
    for (int i = 0; i < 1000; i++) begin
      a = WIDTH'($urandom);
      b = WIDTH'($urandom);
      c = WIDTH'($urandom);
      apply_and_check();
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
