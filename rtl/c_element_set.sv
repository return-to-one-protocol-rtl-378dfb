// c_element_set: two-input C-element with an active-high set.
//
// This is the settable C-element that Return-to-One logic needs to start in
// the all-1s spacer. While set is high the output is forced to 1 regardless
// of the inputs (at transistor level a series PMOS cuts off the pull-up
// network and an NMOS pulls the internal node low, so the output inverter
// drives 1). With set low it behaves as a plain C-element: 00 -> 0, 11 -> 1,
// differing inputs hold.
//
// Set is asynchronous and dominant. The reported latch is the element's state
// keeper and is intended.
//
// Interface: set, a, b in; q out. No clock.
module c_element_set (
  input  logic set,
  input  logic a,
  input  logic b,
  output logic q
);

  always_latch begin
    if (set)         q <= 1'b1;
    else if (a == b) q <= a;
  end

endmodule
