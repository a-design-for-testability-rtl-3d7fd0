// qca_mv: the three-input QCA majority voter, y = ab + bc + ca.
//
// In QCA this is the five-cell cross: three input cells drive a central
// device cell to the majority polarisation, and the fourth side cell is the
// output. Tying one input to 0 makes it a two-input AND, tying it to 1 makes
// it an OR; that fixed input is the voter's control line. Purely
// combinational here; the QCA clock-zone delay is modelled separately
// (qca_pipe).
module qca_mv (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic y
);
  assign y = (a & b) | (b & c) | (c & a);
endmodule
