// qca_dft_top: the testable QCA adders side by side.
//
// Three independent circuits, each with its own control word and data
// ports, all following the same two-vector stuck-at test scheme:
//   d1_* : 1-bit full adder, Design 1 (Test Enable on all six literals)
//   d2_* : 1-bit full adder, Design 2 (Test Enable on the inverted literals)
//   m_*  : N-bit modular adder of Design 1 stages with the CTEST line
// The combinational voter networks are followed by qca_pipe delay lines that
// model the QCA clock-zone pipeline: FA_LATENCY = 2 clock cycles for the
// 1-bit adders, and MOD_LATENCY (by default two cycles per stage, since the
// carry ripples through every stage) for the modular adder. A new input can
// be applied every cycle. The per-stage figure for the modular adder is this
// design's own assumption.
module qca_dft_top
  import qca_dft_pkg::*;
#(
  parameter int unsigned N           = 4,
  parameter int unsigned MOD_LATENCY = FA_LATENCY * N
) (
  input  logic         clk,
  input  logic         rst_n,
  // Design 1 full adder
  input  dft_ctrl_t    d1_ctrl,
  input  logic         d1_a,
  input  logic         d1_b,
  input  logic         d1_cin,
  output logic         d1_sum,
  output logic         d1_carry,
  // Design 2 full adder
  input  dft_ctrl_t    d2_ctrl,
  input  logic         d2_a,
  input  logic         d2_b,
  input  logic         d2_cin,
  output logic         d2_sum,
  output logic         d2_carry,
  // N-bit modular adder
  input  dft_ctrl_t    m_ctrl,
  input  logic [N-1:0] m_a,
  input  logic [N-1:0] m_b,
  input  logic         m_cin,
  output logic [N-1:0] m_sum,
  output logic         m_cout,
  output logic         m_ctest
);
  logic         d1_sum_c, d1_carry_c;
  logic         d2_sum_c, d2_carry_c;
  logic [N-1:0] m_sum_c;
  logic         m_cout_c, m_ctest_c;

  qca_fa_design1 u_d1 (
    .ctrl(d1_ctrl), .a(d1_a), .b(d1_b), .cin(d1_cin),
    .sum(d1_sum_c), .carry(d1_carry_c)
  );
  qca_pipe #(.WIDTH(2), .DEPTH(FA_LATENCY)) u_d1_pipe (
    .clk, .rst_n, .d({d1_carry_c, d1_sum_c}), .q({d1_carry, d1_sum})
  );

  qca_fa_design2 u_d2 (
    .ctrl(d2_ctrl), .a(d2_a), .b(d2_b), .cin(d2_cin),
    .sum(d2_sum_c), .carry(d2_carry_c)
  );
  qca_pipe #(.WIDTH(2), .DEPTH(FA_LATENCY)) u_d2_pipe (
    .clk, .rst_n, .d({d2_carry_c, d2_sum_c}), .q({d2_carry, d2_sum})
  );

  qca_modular_adder #(.N(N)) u_mod (
    .ctrl(m_ctrl), .a(m_a), .b(m_b), .cin(m_cin),
    .sum(m_sum_c), .cout(m_cout_c), .ctest(m_ctest_c)
  );
  qca_pipe #(.WIDTH(N + 2), .DEPTH(MOD_LATENCY)) u_m_pipe (
    .clk, .rst_n, .d({m_ctest_c, m_cout_c, m_sum_c}), .q({m_ctest, m_cout, m_sum})
  );
endmodule
