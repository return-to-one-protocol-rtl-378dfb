// tb_c_element_set: self-checking testbench for the settable C-element.
//
// Checks that set forces the output to 1 for every input pair, including
// 00 (set dominates), that the output keeps the 1 after set is released
// while the inputs differ, and that with set low the element follows the
// C-element truth table during a random walk. Set is also pulsed at random
// moments in the walk. Counts set events and holds and fails if any kind
// never happened.
module tb_c_element_set;

  logic set, a, b, q;
  logic q_ref;
  int   checks = 0, failures = 0;
  int   n_set = 0, n_hold = 0;

  c_element_set dut (.set(set), .a(a), .b(b), .q(q));

  task automatic check(input string what);
    checks++;
    if (q !== q_ref) begin
      failures++;
      $display("FAIL %s: set=%b a=%b b=%b q=%b expected %b", what, set, a, b, q, q_ref);
    end
  endtask

  task automatic apply(input logic nset, input logic na, input logic nb);
    set = nset;
    a = na;
    b = nb;
    #1;
    if (set) begin
      q_ref = 1'b1;
      n_set++;
    end else if (a == b) q_ref = a;
    else n_hold++;
    check("apply");
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    set = 1'b1; a = 1'b0; b = 1'b0;
    q_ref = 1'b1;
    #1;
    check("set with inputs 00");
    // Set dominates every input pair.
    apply(1, 0, 0); apply(1, 0, 1); apply(1, 1, 0); apply(1, 1, 1);
    // Released with differing inputs: keeps the 1.
    apply(1, 0, 1); apply(0, 0, 1); apply(0, 1, 0);
    // Normal operation from there.
    apply(0, 0, 0); apply(0, 1, 0); apply(0, 1, 1); apply(0, 0, 1); apply(0, 0, 0);
    // Set while the output is 0 and the inputs are 00.
    apply(1, 0, 0); apply(0, 0, 1);
    // Random walk with occasional set pulses.
    for (int i = 0; i < 2000; i++) begin
      if ($urandom_range(15, 0) == 0)        apply(1, a, b);
      else if ($urandom_range(1, 0) == 1)    apply(0, ~a, b);
      else                                   apply(0, a, ~b);
    end
    checks++;
    if (n_set == 0 || n_hold == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: set=%0d hold=%0d", n_set, n_hold);
    end
    $display("set events: %0d, holds: %0d", n_set, n_hold);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
