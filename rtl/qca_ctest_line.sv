// qca_ctest_line: the extra fault propagation line of the modular design.
//
// In a cascade, the Test Enable voters of stage i+1 overwrite the carry of
// stage i during test, so a fault that only reaches that carry would be
// masked. This line taps every stage carry and folds them together with a
// chain of N-1 voters: MV-1 takes carry[0] and carry[1], MV-k takes the
// output of MV-(k-1) and carry[k]. The shared control input ctl makes every
// voter an AND (ctl = 0: normal and stuck-at-0 test) or an OR (ctl = 1:
// stuck-at-1 test), so a stuck carry shows on ctest. Combinational.
//   carry : the carries of the N stages, carry[0] from the least significant
//   ctest : the propagated result
module qca_ctest_line #(
  parameter int unsigned N = 4
) (
  input  logic         ctl,
  input  logic [N-1:0] carry,
  output logic         ctest
);
  logic [N-1:0] chain;

  assign chain[0] = carry[0];
  for (genvar k = 1; k < N; k++) begin : g_mv
    qca_mv u_mv (.a(ctl), .b(chain[k-1]), .c(carry[k]), .y(chain[k]));
  end
  assign ctest = chain[N-1];

  initial assert (N >= 2) else $error("qca_ctest_line needs N >= 2");
endmodule
