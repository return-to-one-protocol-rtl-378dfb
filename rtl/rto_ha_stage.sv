// rto_ha_stage: one Return-to-One QDI pipeline stage around a DIMS half adder.
//
// Operands A and B enter a 2-bit RTO dual-rail register; its outputs feed the
// RTO DIMS half adder, and the sum and carry are captured by a second 2-bit
// RTO register. All wires idle at the all-1s spacer, which is where the
// C-elements leak least. One operation is a 4-phase cycle: valid operands on
// a/b, req_in_n falls (operands captured, sum and carry appear at the adder),
// req_out_n falls (result captured), operands return to the spacer, req_in_n
// rises (adder returns to the spacer), req_out_n rises (result returns to the
// spacer).
//
// The two requests are ports: the stage contains no completion detection, so
// the environment (or a neighbouring stage's acknowledge) drives them. rst,
// active high, sets both registers to the spacer. Joining the register and
// the adder this way is this design's own composition of the two building
// blocks.
//
// Interface: rst, req_in_n, req_out_n, a, b in; a_q, b_q (registered
// operands), s, c (registered sum and carry) out. No clock.
module rto_ha_stage
  import rto_pkg::*;
(
  input  logic rst,
  input  logic req_in_n,
  input  logic req_out_n,
  input  dr_t  a,
  input  dr_t  b,
  output dr_t  a_q,
  output dr_t  b_q,
  output dr_t  s,
  output dr_t  c
);

  dr_t [1:0] in_q;
  dr_t       ha_s, ha_c;

  rto_dr_register #(.N(2)) u_in_reg (
    .rst  (rst),
    .req_n(req_in_n),
    .d    ({b, a}),
    .q    (in_q)
  );

  assign a_q = in_q[0];
  assign b_q = in_q[1];

  rto_dims_half_adder u_ha (
    .a(in_q[0]),
    .b(in_q[1]),
    .s(ha_s),
    .c(ha_c)
  );

  rto_dr_register #(.N(2)) u_out_reg (
    .rst  (rst),
    .req_n(req_out_n),
    .d    ({ha_c, ha_s}),
    .q    ({c, s})
  );

endmodule
