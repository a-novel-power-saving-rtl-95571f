// Self-checking testbench for carry_gen_unit.
//
// The operand of the addition is A = {cy, 1'b0}, so A + s is 2*cy + s. The
// expected outputs are worked out with integer addition of the low N-1 bits:
//   g_grp = carry out of A[N-2:0] + s[N-2:0],
//   p_grp = that sum equals 2^(N-1)-1 with no carry out (every position
//           propagates),
//   p_msb = bit N-1 of A + s with no carry into that bit, i.e. A[N-1]^s[N-1].
// Random vectors rarely make every position propagate, so half of the vectors
// force s[N-2:0] = ~A[N-2:0] (optionally with one bit disturbed). Combinational:
// outputs are sampled 1 ns after the inputs change.
module tb_carry_gen_unit;
  localparam int unsigned N = 16;
  localparam int unsigned NVEC = 20000;

  logic [N-1:0] s;
  logic [N-2:0] cy;
  logic p_msb, g_grp, p_grp;
  int checks = 0, failures = 0;
  int n_g = 0, n_p = 0;

  carry_gen_unit dut (.s(s), .cy(cy), .p_msb(p_msb), .g_grp(g_grp), .p_grp(p_grp));

  initial begin : watchdog
    #(NVEC * 30 + 100000);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(input logic [N-1:0] ts, input logic [N-2:0] tc);
    logic [N-1:0] opa;
    logic [N-1:0] low;   // N-1 bit sum plus its carry out
    logic exp_g, exp_p, exp_pm;
    s = ts; cy = tc;
    #1;
    opa    = {tc, 1'b0};
    low    = N'(opa[N-2:0]) + N'(ts[N-2:0]);
    exp_g  = low[N-1];
    exp_p  = (low == N'((1 << (N-1)) - 1));
    exp_pm = opa[N-1] ^ ts[N-1];
    checks++;
    if (g_grp !== exp_g || p_grp !== exp_p || p_msb !== exp_pm) begin
      failures++;
      $display("FAIL s=%h cy=%h got g=%b p=%b pm=%b want g=%b p=%b pm=%b",
               ts, tc, g_grp, p_grp, p_msb, exp_g, exp_p, exp_pm);
    end
    if (exp_g) n_g++;
    if (exp_p) n_p++;
    #4;
  endtask

  initial begin
    logic [N-2:0] c;
    logic [N-1:0] sv;
    check_one('0, '0);
    check_one('1, '1);
    check_one('1, '0);
    check_one('0, '1);
    for (int k = 0; k < NVEC; k++) begin
      check_one(N'($urandom), (N-1)'($urandom));
      c  = (N-1)'($urandom);
      sv = N'($urandom);
      sv[N-2:0] = ~{c[N-3:0], 1'b0};
      if ($urandom % 2 == 1) sv[$urandom % (N-1)] ^= 1'b1;
      check_one(sv, c);
    end
    if (n_g == 0 || n_p == 0) begin
      failures++;
      $display("FAIL: group generate (%0d) or group propagate (%0d) never seen", n_g, n_p);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
