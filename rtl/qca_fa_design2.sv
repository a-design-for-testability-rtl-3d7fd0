// qca_fa_design2: testable full adder, Design 2 ("fewer extra voters").
//
// Only the complemented literals a', b', cin' pass through Test Enable
// voters (n = 3 voters instead of 2n); the true literals go straight from
// the inputs to the AND-OR adder. In test mode the data inputs must
// therefore carry the test value as well, and the test vectors grow with
// the number of inputs:
//   {C0,C1,U0,U1,A,B,Cin} = 1100111 : sum = carry = 1 (stuck-at-0 test)
//   {C0,C1,U0,U1,A,B,Cin} = 0011000 : sum = carry = 0 (stuck-at-1 test)
// Normal operation is C0C1 = 01 or 10 with U0U1 = 01. Combinational.
module qca_fa_design2
  import qca_dft_pkg::*;
(
  input  dft_ctrl_t ctrl,
  input  logic      a,
  input  logic      b,
  input  logic      cin,
  output logic      sum,
  output logic      carry
);
  logic [2:0] lit_t, lit_f;   // {cin, b, a}
  logic [2:0] te_f;           // complemented literals after Test Enable

  qca_literal_gen #(.N(3)) u_inv (
    .x({cin, b, a}), .x_t(lit_t), .x_f(lit_f)
  );

  qca_test_enable #(.W(3)) u_te (
    .c0(ctrl.c0), .c1(ctrl.c1), .lit(lit_f), .y(te_f)
  );

  qca_andor_fa u_andor (
    .u0(ctrl.u0), .u1(ctrl.u1),
    .a_t(lit_t[0]), .a_f(te_f[0]),
    .b_t(lit_t[1]), .b_f(te_f[1]),
    .c_t(lit_t[2]), .c_f(te_f[2]),
    .sum(sum), .carry(carry)
  );
endmodule
