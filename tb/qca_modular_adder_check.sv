// qca_modular_adder_check: self-checking exercise of one qca_modular_adder
// of width N, used by qca_modular_adder_tb at several sizes.
//  - Normal mode: all 2^(2N+1) input combinations against a + b + cin;
//    ctest is then the AND of the N stage carries.
//  - Test mode: 1100 gives all outputs 1, 0011 all 0, whatever the data.
//  - Carry masking: a stuck-at fault on the carry of stages 0..N-2 is
//    overwritten by the next stage's Test Enable voters, so sum and cout
//    keep their fault-free test values; ctest must still flag it.
//  - Every one of the 17 data-path lines of every stage is forced
//    stuck-at-0 and stuck-at-1; the two vectors must expose each fault on
//    sum, cout or ctest.
// Faults are forced from one always block per stage, selected by inj_k,
// inj_site and inj_v and applied on the inj_ev event (inj_k = -1 releases).
`define MOD_CHK_FORCE(K) \
  case (inj_site) \
    0:  force dut.g_stage[K].u_fa.u_andor.ab     = inj_v; \
    1:  force dut.g_stage[K].u_fa.u_andor.anbn   = inj_v; \
    2:  force dut.g_stage[K].u_fa.u_andor.abn    = inj_v; \
    3:  force dut.g_stage[K].u_fa.u_andor.anb    = inj_v; \
    4:  force dut.g_stage[K].u_fa.u_andor.xnor_o = inj_v; \
    5:  force dut.g_stage[K].u_fa.u_andor.xor_o  = inj_v; \
    6:  force dut.g_stage[K].u_fa.u_andor.xor_cn = inj_v; \
    7:  force dut.g_stage[K].u_fa.u_andor.xnor_c = inj_v; \
    8:  force dut.g_stage[K].u_fa.u_andor.xor_c  = inj_v; \
    9:  force dut.g_stage[K].u_fa.u_andor.sum    = inj_v; \
    10: force dut.g_stage[K].u_fa.u_andor.carry  = inj_v; \
    11: force dut.g_stage[K].u_fa.u_andor.a_t    = inj_v; \
    12: force dut.g_stage[K].u_fa.u_andor.a_f    = inj_v; \
    13: force dut.g_stage[K].u_fa.u_andor.b_t    = inj_v; \
    14: force dut.g_stage[K].u_fa.u_andor.b_f    = inj_v; \
    15: force dut.g_stage[K].u_fa.u_andor.c_t    = inj_v; \
    16: force dut.g_stage[K].u_fa.u_andor.c_f    = inj_v; \
    default: ; \
  endcase
`define MOD_CHK_RELEASE(K) \
  begin \
    release dut.g_stage[K].u_fa.u_andor.ab;     release dut.g_stage[K].u_fa.u_andor.anbn; \
    release dut.g_stage[K].u_fa.u_andor.abn;    release dut.g_stage[K].u_fa.u_andor.anb; \
    release dut.g_stage[K].u_fa.u_andor.xnor_o; release dut.g_stage[K].u_fa.u_andor.xor_o; \
    release dut.g_stage[K].u_fa.u_andor.xor_cn; release dut.g_stage[K].u_fa.u_andor.xnor_c; \
    release dut.g_stage[K].u_fa.u_andor.xor_c;  release dut.g_stage[K].u_fa.u_andor.sum; \
    release dut.g_stage[K].u_fa.u_andor.carry;  release dut.g_stage[K].u_fa.u_andor.a_t; \
    release dut.g_stage[K].u_fa.u_andor.a_f;    release dut.g_stage[K].u_fa.u_andor.b_t; \
    release dut.g_stage[K].u_fa.u_andor.b_f;    release dut.g_stage[K].u_fa.u_andor.c_t; \
    release dut.g_stage[K].u_fa.u_andor.c_f; \
  end

module qca_modular_adder_check
  import qca_dft_pkg::*;
#(
  parameter int N = 4
) (
  output int   checks,
  output int   failures,
  output logic done
);
  localparam int NSITES = 17;

  dft_ctrl_t    ctrl;
  logic [N-1:0] a, b, sum;
  logic         cin, cout, ctest;
  int detected, masked_caught;

  int   inj_k = -1;
  int   inj_site = 0;
  logic inj_v = 1'b0;
  event inj_ev;

  qca_modular_adder #(.N(N)) dut (.ctrl, .a, .b, .cin, .sum, .cout, .ctest);

  for (genvar K = 0; K < N; K++) begin : g_inj
    always @(inj_ev) begin
      `MOD_CHK_RELEASE(K)
      if (inj_k == K) `MOD_CHK_FORCE(K)
    end
  end

  task automatic inject(int k, int site, logic v);
    inj_k = k; inj_site = site; inj_v = v;
    ->inj_ev;
  endtask

  task automatic clear();
    inj_k = -1;
    ->inj_ev;
  endtask

  task automatic random_data();
    a = N'($urandom);
    b = N'($urandom);
    cin = 1'($urandom);
  endtask

  function automatic logic stage_carry(int k);
    int m = (1 << (k + 1)) - 1;
    return 1'((((int'(a) & m) + (int'(b) & m) + int'(cin)) >> (k + 1)) & 1);
  endfunction

  initial begin
    logic [N:0]   total;
    logic [N-1:0] carries;
    logic         all_test;
    checks = 0; failures = 0; done = 1'b0;
    detected = 0; masked_caught = 0;

    // normal operation
    ctrl = CTRL_NORMAL;
    for (int v = 0; v < (1 << (2 * N + 1)); v++) begin
      {cin, b, a} = v[2*N:0];
      total = (N+1)'(a) + (N+1)'(b) + (N+1)'(cin);
      for (int k = 0; k < N; k++) carries[k] = stage_carry(k);
      #1;
      checks++;
      if ({cout, sum} !== total) begin
        failures++; $display("FAIL N=%0d normal %0d + %0d + %0d gave %0d", N, a, b, cin, {cout, sum});
      end
      checks++;
      if (ctest !== &carries) begin
        failures++; $display("FAIL N=%0d normal ctest=%b carries=%b", N, ctest, carries);
      end
    end

    // fault-free test responses
    for (int n = 0; n < 16; n++) begin
      random_data();
      ctrl = CTRL_SA0;
      #1 checks++;
      if ({ctest, cout, sum} !== '1) begin failures++; $display("FAIL N=%0d s-a-0 vector fault free", N); end
      ctrl = CTRL_SA1;
      #1 checks++;
      if ({ctest, cout, sum} !== '0) begin failures++; $display("FAIL N=%0d s-a-1 vector fault free", N); end
    end

    // masking of inter-stage carry faults, and their capture by ctest
    for (int k = 0; k < N - 1; k++) begin
      for (int sv = 0; sv < 2; sv++) begin
        ctrl = sv ? CTRL_SA1 : CTRL_SA0;
        random_data();
        inject(k, 10, sv[0]);
        #1;
        all_test = sv ? 1'b0 : 1'b1;
        checks++;
        if (sum !== {N{all_test}} || cout !== all_test) begin
          failures++; $display("FAIL N=%0d carry %0d fault unexpectedly visible on sum/cout", N, k);
        end
        checks++;
        if (ctest === all_test) begin
          failures++; $display("FAIL N=%0d carry %0d stuck-at-%0d missed by ctest", N, k, sv);
        end else masked_caught++;
        clear();
      end
    end

    // every line of every stage
    for (int k = 0; k < N; k++) begin
      for (int s = 0; s < NSITES; s++) begin
        random_data();
        ctrl = CTRL_SA0;
        inject(k, s, 1'b0);
        #1 checks++;
        if ({ctest, cout, sum} === '1) begin
          failures++; $display("FAIL N=%0d stage %0d site %0d stuck-at-0 not detected", N, k, s);
        end else detected++;
        clear();
        ctrl = CTRL_SA1;
        inject(k, s, 1'b1);
        #1 checks++;
        if ({ctest, cout, sum} === '0) begin
          failures++; $display("FAIL N=%0d stage %0d site %0d stuck-at-1 not detected", N, k, s);
        end else detected++;
        clear();
      end
    end
    #1 checks++;
    if ({ctest, cout, sum} !== '0) begin failures++; $display("FAIL N=%0d fault not released", N); end

    checks++;
    if (masked_caught != 2 * (N - 1)) begin
      failures++; $display("FAIL N=%0d masked carry faults caught %0d of %0d", N, masked_caught, 2 * (N - 1));
    end
    $display("N=%0d: faults detected %0d of %0d, masked carry faults caught by ctest %0d",
             N, detected, 2 * N * NSITES, masked_caught);
    done = 1'b1;
  end
endmodule
