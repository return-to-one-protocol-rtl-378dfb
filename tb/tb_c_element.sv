// tb_c_element: self-checking testbench for the two-input C-element.
//
// Walks the truth table (00 -> 0, 11 -> 1, 01/10 -> hold) first in a fixed
// order that visits every state of the element's transition graph, then with
// random input changes. The expected output comes from a reference variable
// updated only when both inputs agree. It counts how often the output held
// with differing inputs after a 0 and after a 1, and fails if either never
// happened. A watchdog ends the run if it stalls.
module tb_c_element;

  logic a, b, q;
  logic q_ref;
  int   checks = 0, failures = 0;
  int   hold0 = 0, hold1 = 0;

  c_element dut (.a(a), .b(b), .q(q));

  task automatic apply(input logic na, input logic nb);
    a = na;
    b = nb;
    #1;
    if (a == b) q_ref = a;
    else if (q_ref) hold1++;
    else hold0++;
    checks++;
    if (q !== q_ref) begin
      failures++;
      $display("FAIL a=%b b=%b q=%b expected %b", a, b, q, q_ref);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    q_ref = 1'b0;
    a = 1'b0; b = 1'b0;
    #1;
    // Directed tour of every transition of the state graph.
    apply(1, 0); apply(0, 0); apply(0, 1); apply(0, 0);
    apply(1, 0); apply(1, 1); apply(0, 1); apply(1, 1);
    apply(1, 0); apply(1, 1); apply(1, 0); apply(0, 0);
    apply(0, 1); apply(1, 1); apply(0, 1); apply(0, 0);
    // Random walk: change one input at a time, as a QDI environment would.
    for (int i = 0; i < 2000; i++) begin
      if ($urandom_range(1, 0) == 1) apply(~a, b);
      else                           apply(a, ~b);
    end
    checks++;
    if (hold0 == 0 || hold1 == 0) begin
      failures++;
      $display("FAIL hold never exercised: hold0=%0d hold1=%0d", hold0, hold1);
    end
    $display("holds after 0: %0d, holds after 1: %0d", hold0, hold1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
