// qca_modular_adder_tb: the modular adder at its default width (4 bits) and
// at 2 bits, each exercised by qca_modular_adder_check: exhaustive normal
// addition, both test vectors, masked inter-stage carry faults caught on
// ctest, and every single stuck-at fault on the data path of every stage.
module qca_modular_adder_tb;
  int   checks4, failures4, checks2, failures2;
  logic done4, done2;

  qca_modular_adder_check          u_n4 (.checks(checks4), .failures(failures4), .done(done4));
  qca_modular_adder_check #(.N(2)) u_n2 (.checks(checks2), .failures(failures2), .done(done2));

  initial begin
    #1000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks4 + checks2, failures4 + failures2 + 1);
    $finish;
  end

  initial begin
    wait (done4 === 1'b1 && done2 === 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks4 + checks2, failures4 + failures2);
    $finish;
  end
endmodule
