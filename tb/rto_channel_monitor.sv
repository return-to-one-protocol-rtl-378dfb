// rto_channel_monitor: checker for the Return-to-One 4-phase rule on one
// dual-rail bit.
//
// A dual-rail pair under RTO may only alternate between the all-1s spacer and
// a valid word (exactly one rail low): spacer -> valid -> spacer. Going from
// one valid word straight to another, or showing the illegal all-0s word, is
// a protocol error. The monitor samples the pair a fraction of a time unit
// after each change, once the zero-delay logic has settled, and compares it
// with the last settled value. It counts valid-word arrivals and returns to
// the spacer, and counts errors; it is passive and only for simulation.
//
// Interface: en (checks off while low, e.g. during reset), d (the pair);
// n_valid, n_spacer, n_errors (running counts).
module rto_channel_monitor
  import rto_pkg::*;
#(
  parameter string NAME = "ch"
) (
  input  logic en,
  input  dr_t  d,
  output int   n_valid,
  output int   n_spacer,
  output int   n_errors
);

  dr_t last;

  initial begin
    n_valid  = 0;
    n_spacer = 0;
    n_errors = 0;
    last     = RTO_SPACER;
  end

  always @(d or en) begin
    #0.25;
    if (!en) begin
      last = d;
    end else if (d != last) begin
      if (d == RTO_INVALID) begin
        n_errors++;
        $display("FAIL %s: illegal all-0s word", NAME);
      end else if (rto_is_valid(d) && rto_is_valid(last)) begin
        n_errors++;
        $display("FAIL %s: valid word %b replaced by %b without a spacer", NAME, last, d);
      end else if (rto_is_valid(d)) begin
        n_valid++;
      end else begin
        n_spacer++;
      end
      last = d;
    end
  end

endmodule
