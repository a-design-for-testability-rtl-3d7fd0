// qca_andor_fa_tb: the literal-input AND-OR full adder.
//  - Normal mode (U0U1 = 01) with consistent literals: sum and carry must
//    equal the two bits of a + b + c for all eight input patterns.
//  - U0U1 = 00 (all AND): all-one literals give sum = carry = 1, and
//    clearing any one literal that reaches an output clears that output.
//  - U0U1 = 11 (all OR): the dual, with all-zero literals.
// In the all-AND network sum depends on all six literals and carry on all
// except c' (carry = ab + xor.c does not use c').
module qca_andor_fa_tb;
  logic u0, u1;
  logic [5:0] lit;   // {c_f, b_f, a_f, c_t, b_t, a_t}
  logic sum, carry;
  int checks = 0, failures = 0;

  qca_andor_fa dut (
    .u0, .u1,
    .a_t(lit[0]), .b_t(lit[1]), .c_t(lit[2]),
    .a_f(lit[3]), .b_f(lit[4]), .c_f(lit[5]),
    .sum, .carry
  );

  task automatic check(logic es, logic ec, string what);
    checks++;
    if (sum !== es || carry !== ec) begin
      failures++;
      $display("FAIL %s: U=%b%b lit=%b sum=%b carry=%b expected %b %b",
               what, u0, u1, lit, sum, carry, es, ec);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int total;
    // normal operation
    u0 = 0; u1 = 1;
    for (int v = 0; v < 8; v++) begin
      lit = {~v[2:0], v[2:0]};
      total = int'(v[0]) + int'(v[1]) + int'(v[2]);
      #1 check(total[0], total[1], "normal add");
    end
    // all AND
    u0 = 0; u1 = 0;
    lit = '1;
    #1 check(1'b1, 1'b1, "all-AND, all ones");
    for (int i = 0; i < 6; i++) begin
      lit = '1;
      lit[i] = 1'b0;
      #1 check(1'b0, (i == 5), "all-AND, one literal cleared");
    end
    // all OR
    u0 = 1; u1 = 1;
    lit = '0;
    #1 check(1'b0, 1'b0, "all-OR, all zeros");
    for (int i = 0; i < 6; i++) begin
      lit = '0;
      lit[i] = 1'b1;
      #1 check(1'b1, (i != 5), "all-OR, one literal set");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
