// rto_pkg: dual-rail types and code-word helpers for Return-to-One (RTO)
// QDI logic.
//
// A dual-rail bit is a pair of wires, t and f. The valid code words are the
// usual ones: logical 0 is t=0/f=1 and logical 1 is t=1/f=0. What RTO changes
// is the spacer, the value every pair returns to between two data words: it
// is all-1s (t=1/f=1) instead of the classic all-0s. A valid word therefore
// appears by one rail falling and is withdrawn by that rail rising again.
// t=0/f=0 is not a legal word under RTO.
//
// The functions are pure helpers for encoding, decoding and classifying a
// dual-rail pair; they are used by the testbenches and by anyone driving the
// RTL from binary data.
package rto_pkg;

  typedef struct packed {
    logic t;  // true rail
    logic f;  // false rail
  } dr_t;

  localparam dr_t RTO_SPACER  = '{t: 1'b1, f: 1'b1};
  localparam dr_t RTO_INVALID = '{t: 1'b0, f: 1'b0};

  // Binary bit -> valid dual-rail word.
  function automatic dr_t rto_encode(input logic v);
    return v ? dr_t'{t: 1'b1, f: 1'b0} : dr_t'{t: 1'b0, f: 1'b1};
  endfunction

  // Valid dual-rail word -> binary bit (meaningless for spacer/invalid).
  function automatic logic rto_decode(input dr_t d);
    return d.t;
  endfunction

  function automatic logic rto_is_valid(input dr_t d);
    return d.t ^ d.f;
  endfunction

  function automatic logic rto_is_spacer(input dr_t d);
    return d.t & d.f;
  endfunction

endpackage
