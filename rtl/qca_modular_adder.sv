// qca_modular_adder: N-bit testable ripple adder built from Design 1 modules
// plus the CTEST fault propagation line.
//
// Stage k is a qca_fa_design1 adding a[k], b[k] and the carry of stage k-1
// (cin for stage 0). Because each stage has its own inverting block and Test
// Enable voters, the incoming carry is re-generated as a pair of literals
// there, so the two 4-bit control vectors 1100 / 0011 still test every
// stage. The price is that a stuck carry between stages is overwritten by
// the next stage's Test Enable voter; qca_ctest_line taps all N carries and
// makes such a fault visible on ctest. All stages and the CTEST line share
// one control word. The CTEST voters take U0 as their control line, so they
// are ANDs in normal operation and in the stuck-at-0 test and ORs in the
// stuck-at-1 test; the choice of U0 is this design's own. Combinational.
//   cout  : carry of the last stage, the only carry that is a primary output
//   ctest : the extra fault propagation output
module qca_modular_adder
  import qca_dft_pkg::*;
#(
  parameter int unsigned N = 4
) (
  input  dft_ctrl_t    ctrl,
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] sum,
  output logic         cout,
  output logic         ctest
);
  logic [N-1:0] carry;

  for (genvar k = 0; k < N; k++) begin : g_stage
    logic stage_cin;
    if (k == 0) begin : g_first
      assign stage_cin = cin;
    end else begin : g_next
      assign stage_cin = carry[k-1];
    end
    qca_fa_design1 u_fa (
      .ctrl(ctrl), .a(a[k]), .b(b[k]), .cin(stage_cin),
      .sum(sum[k]), .carry(carry[k])
    );
  end

  assign cout = carry[N-1];

  qca_ctest_line #(.N(N)) u_ctest (.ctl(ctrl.u0), .carry(carry), .ctest(ctest));
endmodule
