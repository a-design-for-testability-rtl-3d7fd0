// qca_fa_design1: testable full adder, Design 1 ("shorter test vector").
//
// a, b, cin pass through the inverting block, and all six literals (2n for
// n = 3 inputs) then pass through a Test Enable voter before the AND-OR
// adder. Because the Test Enable column alone sets every AND-OR input, the
// data inputs do not matter in test mode, and two 4-bit control vectors test
// the whole data path whatever the circuit:
//   {C0,C1,U0,U1} = 1100 : sum = carry = 1 when fault free (stuck-at-0 test)
//   {C0,C1,U0,U1} = 0011 : sum = carry = 0 when fault free (stuck-at-1 test)
// Normal operation is C0C1 = 01 or 10 with U0U1 = 01. The structure follows
// the scheme; the literal ordering inside the Test Enable column is this
// design's own. Combinational (see qca_pipe for the clock-zone latency).
module qca_fa_design1
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
  logic [5:0] te;             // {cin', b', a', cin, b, a} after Test Enable

  qca_literal_gen #(.N(3)) u_inv (
    .x({cin, b, a}), .x_t(lit_t), .x_f(lit_f)
  );

  qca_test_enable #(.W(6)) u_te (
    .c0(ctrl.c0), .c1(ctrl.c1), .lit({lit_f, lit_t}), .y(te)
  );

  qca_andor_fa u_andor (
    .u0(ctrl.u0), .u1(ctrl.u1),
    .a_t(te[0]), .a_f(te[3]),
    .b_t(te[1]), .b_f(te[4]),
    .c_t(te[2]), .c_f(te[5]),
    .sum(sum), .carry(carry)
  );
endmodule
