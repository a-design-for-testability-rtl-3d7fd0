// qca_andor_fa: literal-input AND-OR full adder built only from majority
// voters, with no inverter inside.
//
// Inputs are the six literals a, a', b, b', c, c' (c is the carry in). The
// network is eleven two-input gates, each a voter whose third input is a
// control line: U0 for the gates that are ANDs in normal operation, U1 for
// the ORs.
//   ab   = a.b          anbn = a'.b'        xnor = ab + anbn
//   abn  = a.b'         anb  = a'.b         xor  = abn + anb
//   xor_cn = xor.c'     xnor_c = xnor.c     sum   = xor_cn + xnor_c
//   xor_c  = xor.c                          carry = ab + xor_c
// With U0U1 = 01 it is a full adder. With U0U1 = 00 every gate is an AND and
// with 11 every gate is an OR, which is what the two-vector stuck-at test
// needs. The gate names ab, a'b', xnor, xor.c follow the fault sites the
// scheme discusses; the exact way of sharing xor/xnor between sum and carry
// is this design's own reading. Every internal net is a named wire so that
// a testbench can force a stuck-at value onto it. Combinational.
module qca_andor_fa (
  input  logic u0,     // control line of the AND voters
  input  logic u1,     // control line of the OR voters
  input  logic a_t, a_f,
  input  logic b_t, b_f,
  input  logic c_t, c_f,
  output logic sum,
  output logic carry
);
  logic ab, anbn, abn, anb;
  logic xnor_o, xor_o;
  logic xor_cn, xnor_c, xor_c;

  // first level: products of the literals
  qca_mv u_ab   (.a(u0), .b(a_t), .c(b_t), .y(ab));
  qca_mv u_anbn (.a(u0), .b(a_f), .c(b_f), .y(anbn));
  qca_mv u_abn  (.a(u0), .b(a_t), .c(b_f), .y(abn));
  qca_mv u_anb  (.a(u0), .b(a_f), .c(b_t), .y(anb));
  // second level: a xnor b, a xor b
  qca_mv u_xnor (.a(u1), .b(ab),  .c(anbn), .y(xnor_o));
  qca_mv u_xor  (.a(u1), .b(abn), .c(anb),  .y(xor_o));
  // third level: gating with the carry-in literals
  qca_mv u_xorcn (.a(u0), .b(xor_o),  .c(c_f), .y(xor_cn));
  qca_mv u_xnorc (.a(u0), .b(xnor_o), .c(c_t), .y(xnor_c));
  qca_mv u_xorc  (.a(u0), .b(xor_o),  .c(c_t), .y(xor_c));
  // outputs
  qca_mv u_sum   (.a(u1), .b(xor_cn), .c(xnor_c), .y(sum));
  qca_mv u_carry (.a(u1), .b(ab),     .c(xor_c),  .y(carry));
endmodule
