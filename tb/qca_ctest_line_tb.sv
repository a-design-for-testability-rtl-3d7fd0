// qca_ctest_line_tb: the fault propagation line for N = 4 (default) and
// N = 2. With ctl = 0 the output must be the AND of all carries, with
// ctl = 1 their OR, for every carry pattern.
module qca_ctest_line_tb;
  logic       ctl;
  logic [3:0] c4;
  logic [1:0] c2;
  logic       t4, t2;
  int checks = 0, failures = 0;

  qca_ctest_line          dut4 (.ctl, .carry(c4), .ctest(t4));
  qca_ctest_line #(.N(2)) dut2 (.ctl, .carry(c2), .ctest(t2));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < 2; m++) begin
      ctl = m[0];
      for (int v = 0; v < 16; v++) begin
        c4 = v[3:0];
        c2 = v[1:0];
        #1;
        checks += 2;
        if (t4 !== (ctl ? (v[3:0] != 0) : (v[3:0] == 4'hf))) begin
          failures++; $display("FAIL N=4 ctl=%b carry=%b ctest=%b", ctl, c4, t4);
        end
        if (t2 !== (ctl ? (v[1:0] != 0) : (v[1:0] == 2'h3))) begin
          failures++; $display("FAIL N=2 ctl=%b carry=%b ctest=%b", ctl, c2, t2);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
