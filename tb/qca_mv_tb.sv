// qca_mv_tb: exhaustive check of the majority voter against a count of ones,
// plus the AND (c = 0) and OR (c = 1) configurations and the single-voter
// stuck-at test vectors {UAB} = 011 and 100.
module qca_mv_tb;
  logic a, b, c, y;
  int checks = 0, failures = 0;

  qca_mv dut (.a, .b, .c, .y);

  task automatic check(logic exp, string what);
    checks++;
    if (y !== exp) begin
      failures++;
      $display("FAIL %s: a=%b b=%b c=%b y=%b expected %b", what, a, b, c, y, exp);
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
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = v[2:0];
      #1 check((int'(a) + int'(b) + int'(c)) >= 2, "majority");
      check(c ? (a | b) : (a & b), "and/or form");
    end
    // single-voter stuck-at vectors: control c = U, data a, b
    c = 0; a = 1; b = 1; #1 check(1'b1, "s-a-0 vector 011");
    c = 1; a = 0; b = 0; #1 check(1'b0, "s-a-1 vector 100");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
