// c_element: two-input Muller C-element.
//
// The output copies the inputs when they agree and keeps its last value when
// they differ (00 -> 0, 11 -> 1, 01/10 -> hold). It is the join of two
// independent events and the basic storage element of QDI logic.
//
// The element is written as a level-sensitive latch: enable is (a == b) and
// data is a. The latch that tools report here is intended: it is the
// C-element's state keeper. There is no reset input; the element reaches a
// known value as soon as both inputs carry the same level, which in RTO logic
// is the all-1s spacer.
//
// Interface: a, b in; q out. No clock; q follows a matching input pair
// without delay in simulation.
module c_element (
  input  logic a,
  input  logic b,
  output logic q
);

  always_latch begin
    if (a == b) q <= a;
  end

endmodule
