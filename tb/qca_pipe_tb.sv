// qca_pipe_tb: the default delay line must show each input word exactly
// two rising clock edges later, accept a new word every cycle, and clear on
// reset. A second instance checks a deeper line (5 cycles).
module qca_pipe_tb;
  logic       clk = 0, rst_n = 0;
  logic [1:0] d, q;
  logic [7:0] d5, q5;
  int checks = 0, failures = 0;
  logic [1:0] hist  [$];
  logic [7:0] hist5 [$];

  qca_pipe dut (.clk, .rst_n, .d, .q);
  qca_pipe #(.WIDTH(8), .DEPTH(5)) dut5 (.clk, .rst_n, .d(d5), .q(q5));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = '1; d5 = '1;
    repeat (2) @(posedge clk);
    #1;
    checks += 2;
    if (q !== '0 || q5 !== '0) begin failures++; $display("FAIL reset value"); end
    rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      d  = 2'($urandom);
      d5 = 8'($urandom);
      hist.push_back(d);
      hist5.push_back(d5);
      @(posedge clk);
      #1;
      if (hist.size() > 2) void'(hist.pop_front());
      if (hist5.size() > 5) void'(hist5.pop_front());
      if (n >= 1) begin
        checks++;
        if (q !== hist[0]) begin failures++; $display("FAIL depth 2 at %0d: q=%b exp %b", n, q, hist[0]); end
      end
      if (n >= 4) begin
        checks++;
        if (q5 !== hist5[0]) begin failures++; $display("FAIL depth 5 at %0d", n); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
