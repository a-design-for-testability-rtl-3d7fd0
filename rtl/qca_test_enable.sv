// qca_test_enable: the Test Enable column of majority voters.
//
// One voter per literal, with the two Test Enable control lines C0 and C1 as
// its other inputs: y[i] = MAJ(c0, c1, lit[i]).
//   C0C1 = 01 or 10 : y = lit   (normal operation, literal passes)
//   C0C1 = 11       : y = all 1 (stuck-at-0 test of the AND-OR block)
//   C0C1 = 00       : y = all 0 (stuck-at-1 test of the AND-OR block)
// This lets the AND-OR network receive all-1 or all-0 even where a literal
// and its complement both feed it. Combinational; W is the number of
// literals it covers.
module qca_test_enable #(
  parameter int unsigned W = 6
) (
  input  logic         c0,
  input  logic         c1,
  input  logic [W-1:0] lit,
  output logic [W-1:0] y
);
  for (genvar i = 0; i < W; i++) begin : g_mv
    qca_mv u_mv (.a(c0), .b(c1), .c(lit[i]), .y(y[i]));
  end
endmodule
