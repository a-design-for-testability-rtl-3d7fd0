// qca_literal_gen_tb: every input pattern of the 3-input inverting block and
// random patterns on a 16-input one; each true literal must equal its input
// and each false literal its complement.
module qca_literal_gen_tb;
  logic [2:0]  x3, t3, f3;
  logic [15:0] x16, t16, f16;
  int checks = 0, failures = 0;

  qca_literal_gen           dut3  (.x(x3),  .x_t(t3),  .x_f(f3));
  qca_literal_gen #(.N(16)) dut16 (.x(x16), .x_t(t16), .x_f(f16));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      x3 = v[2:0];
      #1;
      for (int i = 0; i < 3; i++) begin
        checks += 2;
        if (t3[i] !== v[i]) begin failures++; $display("FAIL true literal %0d of %b", i, x3); end
        if (f3[i] !== !v[i]) begin failures++; $display("FAIL false literal %0d of %b", i, x3); end
      end
    end
    for (int n = 0; n < 50; n++) begin
      x16 = 16'($urandom);
      #1;
      for (int i = 0; i < 16; i++) begin
        checks++;
        if (t16[i] == f16[i] || t16[i] != x16[i]) begin
          failures++; $display("FAIL 16-bit literal %0d of %h", i, x16);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
