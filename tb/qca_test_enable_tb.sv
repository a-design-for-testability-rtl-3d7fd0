// qca_test_enable_tb: all four C0C1 settings against every 6-bit literal
// pattern. 01 and 10 must pass the literals, 11 must give all ones and 00
// all zeros, whatever the literals are.
module qca_test_enable_tb;
  logic       c0, c1;
  logic [5:0] lit, y;
  int checks = 0, failures = 0;

  qca_test_enable dut (.c0, .c1, .lit, .y);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [5:0] exp;
    for (int m = 0; m < 4; m++) begin
      {c0, c1} = m[1:0];
      for (int v = 0; v < 64; v++) begin
        lit = v[5:0];
        case (m)
          0:       exp = 6'b000000;
          3:       exp = 6'b111111;
          default: exp = v[5:0];
        endcase
        #1;
        checks++;
        if (y !== exp) begin
          failures++;
          $display("FAIL C0C1=%b%b lit=%b y=%b expected %b", c0, c1, lit, y, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
