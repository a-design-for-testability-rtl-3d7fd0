// qca_fa_design2_tb: Design 2 testable full adder.
//  - Normal mode, C0C1 = 01 and 10: exhaustive against a + b + cin.
//  - Test mode: {C0,C1,U0,U1,A,B,Cin} = 1100111 must give sum = carry = 1
//    and 0011000 must give 0. With the control part alone (data not all
//    ones / zeros) the outputs must not reach the test value, since the
//    true literals bypass the Test Enable voters.
//  - Complementing all seven inputs (control lines included) complements
//    both outputs, a property of any network of majority voters.
//  - Fault injection: each of the 17 data-path lines of the AND-OR adder is
//    forced stuck-at-0 and stuck-at-1; the two vectors must expose every
//    fault. Two reported cases are checked exactly: the XOR.C line
//    stuck-at-0 shows on carry only, and the A'B' line stuck-at-1 on sum
//    only.
module qca_fa_design2_tb;
  import qca_dft_pkg::*;

  dft_ctrl_t ctrl;
  logic a, b, cin, sum, carry;
  int checks = 0, failures = 0;
  int detected = 0;

  localparam int NSITES = 17;
  localparam string SITE_NAME [NSITES] = '{
    "ab", "a'b'", "ab'", "a'b", "xnor", "xor", "xor.c'", "xnor.c", "xor.c",
    "sum", "carry", "a", "a'", "b", "b'", "c", "c'"};

  qca_fa_design2 dut (.ctrl, .a, .b, .cin, .sum, .carry);

  task automatic inject(int site, logic v);
    case (site)
      0:  force dut.u_andor.ab     = v;
      1:  force dut.u_andor.anbn   = v;
      2:  force dut.u_andor.abn    = v;
      3:  force dut.u_andor.anb    = v;
      4:  force dut.u_andor.xnor_o = v;
      5:  force dut.u_andor.xor_o  = v;
      6:  force dut.u_andor.xor_cn = v;
      7:  force dut.u_andor.xnor_c = v;
      8:  force dut.u_andor.xor_c  = v;
      9:  force dut.u_andor.sum    = v;
      10: force dut.u_andor.carry  = v;
      11: force dut.u_andor.a_t    = v;
      12: force dut.u_andor.a_f    = v;
      13: force dut.u_andor.b_t    = v;
      14: force dut.u_andor.b_f    = v;
      15: force dut.u_andor.c_t    = v;
      16: force dut.u_andor.c_f    = v;
      default: ;
    endcase
  endtask

  task automatic clear(int site);
    case (site)
      0:  release dut.u_andor.ab;
      1:  release dut.u_andor.anbn;
      2:  release dut.u_andor.abn;
      3:  release dut.u_andor.anb;
      4:  release dut.u_andor.xnor_o;
      5:  release dut.u_andor.xor_o;
      6:  release dut.u_andor.xor_cn;
      7:  release dut.u_andor.xnor_c;
      8:  release dut.u_andor.xor_c;
      9:  release dut.u_andor.sum;
      10: release dut.u_andor.carry;
      11: release dut.u_andor.a_t;
      12: release dut.u_andor.a_f;
      13: release dut.u_andor.b_t;
      14: release dut.u_andor.b_f;
      15: release dut.u_andor.c_t;
      16: release dut.u_andor.c_f;
      default: ;
    endcase
  endtask

  task automatic expect_out(logic es, logic ec, string what);
    checks++;
    if (sum !== es || carry !== ec) begin
      failures++;
      $display("FAIL %s: ctrl=%b abc=%b%b%b sum=%b carry=%b expected %b %b",
               what, ctrl, a, b, cin, sum, carry, es, ec);
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
    // normal operation, both normal settings of C0C1
    for (int m = 0; m < 2; m++) begin
      ctrl = CTRL_NORMAL;
      if (m == 1) begin ctrl.c0 = 1'b1; ctrl.c1 = 1'b0; end
      for (int v = 0; v < 8; v++) begin
        {cin, b, a} = v[2:0];
        total = int'(a) + int'(b) + int'(cin);
        #1 expect_out(total[0], total[1], "normal add");
      end
    end

    // fault-free test responses
    ctrl = CTRL_SA0;
    for (int n = 0; n < 8; n++) begin
      {cin, b, a} = 3'b111;
      #1 expect_out(1'b1, 1'b1, "s-a-0 vector, fault free");
    end
    ctrl = CTRL_SA1;
    for (int n = 0; n < 8; n++) begin
      {cin, b, a} = 3'b000;
      #1 expect_out(1'b0, 1'b0, "s-a-1 vector, fault free");
    end

    // the control part alone is not enough in Design 2
    ctrl = CTRL_SA0; {cin, b, a} = 3'b000;
    #1 checks++;
    if (sum !== 1'b0) begin failures++; $display("FAIL SA0 control with data 000 gave sum=%b", sum); end
    ctrl = CTRL_SA1; {cin, b, a} = 3'b111;
    #1 checks++;
    if (sum !== 1'b1) begin failures++; $display("FAIL SA1 control with data 111 gave sum=%b", sum); end

    // self-duality of a voter network: complementing every input, control
    // lines included, complements both outputs
    for (int v = 0; v < 128; v++) begin
      logic [1:0] out_v;
      {ctrl, cin, b, a} = v[6:0];
      #1 out_v = {sum, carry};
      {ctrl, cin, b, a} = ~v[6:0];
      #1 checks++;
      if ({sum, carry} !== ~out_v) begin
        failures++; $display("FAIL complemented inputs %b did not complement outputs", v[6:0]);
      end
    end

    // single stuck-at faults on every data-path line
    for (int s = 0; s < NSITES; s++) begin
      ctrl = CTRL_SA0; {cin, b, a} = 3'b111;
      inject(s, 1'b0);
      #1 checks++;
      if ({sum, carry} == 2'b11) begin
        failures++; $display("FAIL %s stuck-at-0 not detected", SITE_NAME[s]);
      end else detected++;
      clear(s);
      ctrl = CTRL_SA1; {cin, b, a} = 3'b000;
      inject(s, 1'b1);
      #1 checks++;
      if ({sum, carry} == 2'b00) begin
        failures++; $display("FAIL %s stuck-at-1 not detected", SITE_NAME[s]);
      end else detected++;
      clear(s);
      #1 expect_out(1'b0, 1'b0, "released");
    end

    // reported cases
    ctrl = CTRL_SA0; {cin, b, a} = 3'b111;
    inject(8, 1'b0);
    #1 expect_out(1'b1, 1'b0, "xor.c stuck-at-0 reaches carry only");
    clear(8);
    ctrl = CTRL_SA1; {cin, b, a} = 3'b000;
    inject(1, 1'b1);
    #1 expect_out(1'b1, 1'b0, "a'b' stuck-at-1 reaches sum only");
    clear(1);

    checks++;
    if (detected != 2 * NSITES) begin
      failures++; $display("FAIL detected %0d of %0d faults", detected, 2 * NSITES);
    end
    $display("faults detected: %0d of %0d", detected, 2 * NSITES);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
