// rto_dr_register: N-bit dual-rail QDI register for the Return-to-One protocol.
//
// Every rail of every bit goes through one settable C-element whose other
// input is the shared request. The request is active low: with req_n = 0 a
// valid word on d (one rail low per bit) passes to q; with req_n = 1 the
// spacer (both rails high) passes. A rail whose data and request disagree
// holds, so the register keeps a captured word after its input has returned
// to the spacer until req_n rises, and keeps the spacer while new data waits
// for req_n to fall. rst (active high) sets every C-element, which loads the
// all-1s spacer into q.
//
// The structure, one C-element per rail joined with REQ, follows the classic
// C-element register; the set-type reset and the active-low request are the
// changes that make it an RTO register. The width N and the polarity of rst
// are this design's choices.
//
// Interface: rst, req_n, d[N] in; q[N] out. No clock: q responds to inputs
// as soon as a C-element's two inputs agree.
module rto_dr_register
  import rto_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic          rst,
  input  logic          req_n,
  input  dr_t  [N-1:0]  d,
  output dr_t  [N-1:0]  q
);

  for (genvar i = 0; i < N; i++) begin : g_bit
    c_element_set u_t (.set(rst), .a(d[i].t), .b(req_n), .q(q[i].t));
    c_element_set u_f (.set(rst), .a(d[i].f), .b(req_n), .q(q[i].f));
  end

endmodule
