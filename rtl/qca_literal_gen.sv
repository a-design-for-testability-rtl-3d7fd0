// qca_literal_gen: the inverting block that prepares input literals.
//
// For each of the N primary inputs it delivers the true value and its
// complement, so that the following AND-OR network never needs an inverter.
// In QCA this is an inverter (45-degree) chain with ripper cells tapping the
// true and complemented polarities; logically it is a wire plus an inverter
// per input. Combinational.
//   x     : primary inputs
//   x_t   : true literals  (x_t[i] = x[i])
//   x_f   : false literals (x_f[i] = ~x[i])
module qca_literal_gen #(
  parameter int unsigned N = 3
) (
  input  logic [N-1:0] x,
  output logic [N-1:0] x_t,
  output logic [N-1:0] x_f
);
  assign x_t = x;
  assign x_f = ~x;
endmodule
