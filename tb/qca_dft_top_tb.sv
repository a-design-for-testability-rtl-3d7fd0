// qca_dft_top_tb: end-to-end run of the top at its default parameters
// (4-bit modular adder, 2-cycle adder latency, 8-cycle modular latency).
//
// Every clock cycle each of the three circuits gets a new control word and
// data: normal addition, the stuck-at-0 test vector or the stuck-at-1 test
// vector. In some test cycles a stuck-at fault is forced onto one line for
// that cycle only: in Design 1 and Design 2 onto a line of the AND-OR
// adder, in the modular adder onto the carry of stage 0, which the next
// stage masks. Expected outputs are computed here from the operation (a sum,
// or the known fault-free / faulty test response) and compared with the
// outputs exactly FA_LATENCY or MOD_LATENCY cycles later, which also checks
// the pipeline latency and the one-input-per-cycle rate. Each mechanism
// (normal add, both test vectors, fault seen on each circuit, masked carry
// fault seen only on ctest) is counted, and one that never happened is a
// failure.
module qca_dft_top_tb;
  import qca_dft_pkg::*;

  localparam int N      = 4;
  localparam int LAT_FA = FA_LATENCY;
  localparam int LAT_M  = FA_LATENCY * N;
  localparam int CYCLES = 3000;

  logic clk = 1'b0, rst_n = 1'b0;
  dft_ctrl_t    d1_ctrl, d2_ctrl, m_ctrl;
  logic         d1_a, d1_b, d1_cin, d1_sum, d1_carry;
  logic         d2_a, d2_b, d2_cin, d2_sum, d2_carry;
  logic [N-1:0] m_a, m_b, m_sum;
  logic         m_cin, m_cout, m_ctest;

  qca_dft_top dut (
    .clk, .rst_n,
    .d1_ctrl, .d1_a, .d1_b, .d1_cin, .d1_sum, .d1_carry,
    .d2_ctrl, .d2_a, .d2_b, .d2_cin, .d2_sum, .d2_carry,
    .m_ctrl, .m_a, .m_b, .m_cin, .m_sum, .m_cout, .m_ctest
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_normal = 0, n_sa0 = 0, n_sa1 = 0;
  int n_d1_fault = 0, n_d2_fault = 0, n_masked = 0;

  logic [1:0]   exp_d1 [$];
  logic [1:0]   exp_d2 [$];
  logic [N+1:0] exp_m  [$];

  initial begin
    repeat (CYCLES + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic dft_mode_t pick_mode();
    int r = $urandom_range(0, 9);
    return (r < 6) ? MODE_NORMAL : (r < 8) ? MODE_SA0 : MODE_SA1;
  endfunction

  // fault sites of the 1-bit adders with their known effect on {sum, carry}
  //   0: xnor  s-a-0 under 1100 -> sum 0, carry 1
  //   1: xor.c s-a-0 under 1100 -> sum 1, carry 0
  //   2: ab    s-a-1 under 0011 -> sum 1, carry 1
  //   3: a'b'  s-a-1 under 0011 -> sum 1, carry 0
  task automatic force_d1(int f);
    case (f)
      0: force dut.u_d1.u_andor.xnor_o = 1'b0;
      1: force dut.u_d1.u_andor.xor_c  = 1'b0;
      2: force dut.u_d1.u_andor.ab     = 1'b1;
      3: force dut.u_d1.u_andor.anbn   = 1'b1;
      default: ;
    endcase
  endtask
  task automatic force_d2(int f);
    case (f)
      0: force dut.u_d2.u_andor.xnor_o = 1'b0;
      1: force dut.u_d2.u_andor.xor_c  = 1'b0;
      2: force dut.u_d2.u_andor.ab     = 1'b1;
      3: force dut.u_d2.u_andor.anbn   = 1'b1;
      default: ;
    endcase
  endtask
  task automatic release_all();
    release dut.u_d1.u_andor.xnor_o; release dut.u_d1.u_andor.xor_c;
    release dut.u_d1.u_andor.ab;     release dut.u_d1.u_andor.anbn;
    release dut.u_d2.u_andor.xnor_o; release dut.u_d2.u_andor.xor_c;
    release dut.u_d2.u_andor.ab;     release dut.u_d2.u_andor.anbn;
    release dut.u_mod.g_stage[0].u_fa.u_andor.carry;
  endtask

  function automatic logic [1:0] fault_effect(int f);
    case (f)
      0: return 2'b10;   // {carry, sum}
      1: return 2'b01;
      2: return 2'b11;
      default: return 2'b01;
    endcase
  endfunction

  function automatic logic [1:0] fa_expect(dft_mode_t mode, logic a, logic b, logic c);
    int t = int'(a) + int'(b) + int'(c);
    case (mode)
      MODE_SA0: return 2'b11;
      MODE_SA1: return 2'b00;
      default:  return {t[1], t[0]};
    endcase
  endfunction

  task automatic drive_cycle();
    dft_mode_t md1, md2, mm;
    int f;
    logic [N:0] total;
    logic [1:0] e;
    logic all_carry;
    release_all();
    // Design 1
    md1 = pick_mode();
    d1_ctrl = ctrl_for(md1);
    {d1_cin, d1_b, d1_a} = 3'($urandom);
    e = fa_expect(md1, d1_a, d1_b, d1_cin);
    if (md1 != MODE_NORMAL && $urandom_range(0, 2) == 0) begin
      f = (md1 == MODE_SA0) ? $urandom_range(0, 1) : $urandom_range(2, 3);
      force_d1(f);
      e = fault_effect(f);
      n_d1_fault++;
    end
    exp_d1.push_back(e);
    // Design 2: the data inputs carry the test value in test mode
    md2 = pick_mode();
    d2_ctrl = ctrl_for(md2);
    case (md2)
      MODE_SA0: {d2_cin, d2_b, d2_a} = 3'b111;
      MODE_SA1: {d2_cin, d2_b, d2_a} = 3'b000;
      default:  {d2_cin, d2_b, d2_a} = 3'($urandom);
    endcase
    e = fa_expect(md2, d2_a, d2_b, d2_cin);
    if (md2 != MODE_NORMAL && $urandom_range(0, 2) == 0) begin
      f = (md2 == MODE_SA0) ? $urandom_range(0, 1) : $urandom_range(2, 3);
      force_d2(f);
      e = fault_effect(f);
      n_d2_fault++;
    end
    exp_d2.push_back(e);
    // modular adder
    mm = pick_mode();
    m_ctrl = ctrl_for(mm);
    m_a = N'($urandom); m_b = N'($urandom); m_cin = 1'($urandom);
    case (mm)
      MODE_SA0: begin
        if ($urandom_range(0, 1) == 0) begin
          force dut.u_mod.g_stage[0].u_fa.u_andor.carry = 1'b0;
          exp_m.push_back({1'b0, 1'b1, {N{1'b1}}});   // only ctest shows it
          n_masked++;
        end else exp_m.push_back('1);
        n_sa0++;
      end
      MODE_SA1: begin
        if ($urandom_range(0, 1) == 0) begin
          force dut.u_mod.g_stage[0].u_fa.u_andor.carry = 1'b1;
          exp_m.push_back({1'b1, 1'b0, {N{1'b0}}});
          n_masked++;
        end else exp_m.push_back('0);
        n_sa1++;
      end
      default: begin
        total = (N+1)'(m_a) + (N+1)'(m_b) + (N+1)'(m_cin);
        // in normal mode ctest is the AND of the stage carries; the carry
        // out of bit k is bit k+1 of the sum of the low k+1 bits
        all_carry = 1'b1;
        for (int k = 0; k < N; k++)
          if (((((int'(m_a) & ((1 << (k + 1)) - 1)) + (int'(m_b) & ((1 << (k + 1)) - 1))
                 + int'(m_cin)) >> (k + 1)) & 1) == 0) all_carry = 1'b0;
        exp_m.push_back({all_carry, total});
        n_normal++;
      end
    endcase
  endtask

  initial begin
    d1_ctrl = CTRL_NORMAL; d2_ctrl = CTRL_NORMAL; m_ctrl = CTRL_NORMAL;
    {d1_a, d1_b, d1_cin, d2_a, d2_b, d2_cin, m_cin} = '1;
    m_a = '1; m_b = '1;
    repeat (3) @(posedge clk);
    #1 checks++;
    if ({d1_sum, d1_carry, d2_sum, d2_carry, m_sum, m_cout, m_ctest} !== '0) begin
      failures++; $display("FAIL outputs not cleared by reset");
    end
    @(negedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < CYCLES; cyc++) begin
      drive_cycle();
      @(posedge clk);
      #1;
      if (exp_d1.size() == LAT_FA) begin
        checks++;
        if ({d1_carry, d1_sum} !== exp_d1[0]) begin
          failures++; $display("FAIL cycle %0d d1 got %b%b expected %b", cyc, d1_carry, d1_sum, exp_d1[0]);
        end
        void'(exp_d1.pop_front());
      end
      if (exp_d2.size() == LAT_FA) begin
        checks++;
        if ({d2_carry, d2_sum} !== exp_d2[0]) begin
          failures++; $display("FAIL cycle %0d d2 got %b%b expected %b", cyc, d2_carry, d2_sum, exp_d2[0]);
        end
        void'(exp_d2.pop_front());
      end
      if (exp_m.size() == LAT_M) begin
        checks++;
        if ({m_ctest, m_cout, m_sum} !== exp_m[0]) begin
          failures++; $display("FAIL cycle %0d modular got %b expected %b", cyc, {m_ctest, m_cout, m_sum}, exp_m[0]);
        end
        void'(exp_m.pop_front());
      end
      @(negedge clk);
    end
    release_all();

    $display("normal=%0d sa0=%0d sa1=%0d d1_faults=%0d d2_faults=%0d masked_carry_faults=%0d",
             n_normal, n_sa0, n_sa1, n_d1_fault, n_d2_fault, n_masked);
    checks += 6;
    if (n_normal == 0)   begin failures++; $display("FAIL no normal additions"); end
    if (n_sa0 == 0)      begin failures++; $display("FAIL no stuck-at-0 test vectors"); end
    if (n_sa1 == 0)      begin failures++; $display("FAIL no stuck-at-1 test vectors"); end
    if (n_d1_fault == 0) begin failures++; $display("FAIL no Design 1 fault"); end
    if (n_d2_fault == 0) begin failures++; $display("FAIL no Design 2 fault"); end
    if (n_masked == 0)   begin failures++; $display("FAIL no masked carry fault"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
