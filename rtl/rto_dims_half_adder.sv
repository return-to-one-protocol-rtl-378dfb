// rto_dims_half_adder: dual-rail half adder in delay-insensitive minterm
// synthesis (DIMS), for the Return-to-One (all-1s spacer) protocol.
//
// Four C-elements form the minterms of the two operands. Under RTO a valid
// rail is the one that is low, so minterm Mab falls only when A = a and B = b
// have both arrived:
//   M00 = C(A.t, B.t)   M01 = C(A.t, B.f)   M10 = C(A.f, B.t)   M11 = C(A.f, B.f)
// The OR gates of the all-0s version become AND gates (an active-low OR), and
// the output rails are the true/false swap of the all-0s version:
//   S.t = M00 & M11   (sum 0)      S.f = M01 & M10         (sum 1)
//   C.t = M00 & M01 & M10 (carry 0)  C.f = M11             (carry 1)
// With the operands at the spacer every minterm is 1 and so are all outputs;
// the outputs stay valid until both operands have returned to the spacer, as
// the C-elements hold while their inputs differ.
//
// The minterm C-elements have no set input, as in the usual DIMS gate; the
// minterm inputs are chosen here so that the code words are the ordinary
// dual-rail ones (0 = t low, 1 = f low under RTO).
//
// Interface: a, b in; s (sum), c (carry) out. No clock.
module rto_dims_half_adder
  import rto_pkg::*;
(
  input  dr_t a,
  input  dr_t b,
  output dr_t s,
  output dr_t c
);

  logic m00, m01, m10, m11;

  c_element u_m00 (.a(a.t), .b(b.t), .q(m00));
  c_element u_m01 (.a(a.t), .b(b.f), .q(m01));
  c_element u_m10 (.a(a.f), .b(b.t), .q(m10));
  c_element u_m11 (.a(a.f), .b(b.f), .q(m11));

  always_comb begin
    s.t = m00 & m11;
    s.f = m01 & m10;
    c.t = m00 & m01 & m10;
    c.f = m11;
  end

endmodule
