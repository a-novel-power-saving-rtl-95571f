// End-to-end testbench of the sign detector at its default size (N = 16,
// moduli 131071, 65535, 65536, M about 5.6e14).
//
// Picks integers X in [0, M), forms their residues x1 = X mod (2^17-1),
// x2 = X mod (2^16-1), x3 = X mod 2^16 with the simulator's own % operator,
// and checks sign against X >= M/2. Vectors cover random X over the whole
// range and every X in windows at 0, at M/2 (the sign boundary) and just below
// M. The detector is combinational: sign is sampled 1 ns after the residues
// change.
//
// It also counts how often each mechanism of the design was exercised and
// fails if one never was: the correction W = 1 and W = 0; the equal case
// x2 == x1' with the top bit x1[N] both clear (W = 1) and set (W = 0); a
// sign bit that W flips (the low N-1 bits of ~x1'' + x2 + x3 all ones, so the
// carry-in W travels up to the sign bit) and one that it does not; and both
// sign values. These counts are worked out from the residues in the testbench,
// not read from inside the detector.
module tb_rns_sign_detector;
  localparam int unsigned N = 16;
  localparam longint unsigned M1 = (64'd1 << (N + 1)) - 1;
  localparam longint unsigned M2 = (64'd1 << N) - 1;
  localparam longint unsigned M3 = 64'd1 << N;
  localparam longint unsigned M  = M1 * M2 * M3;
  localparam int unsigned NRAND = 300000;
  localparam longint unsigned WIN = 70000;

  logic [N:0]   x1;
  logic [N-1:0] x2, x3;
  logic         sign;
  int checks = 0, failures = 0;
  int n_w1 = 0, n_w0 = 0, n_eq_top0 = 0, n_eq_top1 = 0;
  int n_gen = 0, n_prop_w = 0, n_neg = 0, n_pos = 0;

  rns_sign_detector dut (.x1(x1), .x2(x2), .x3(x3), .sign(sign));

  initial begin : watchdog
    #((longint'(NRAND) + 3 * WIN) * 10 + 100000);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_x(input longint unsigned x);
    logic want, w_ref;
    logic [N-1:0] x1_low, sum3;
    x1 = (N+1)'(x % M1);
    x2 = N'(x % M2);
    x3 = N'(x % M3);
    #1;
    want = (x >= M / 2);
    checks++;
    if (sign !== want) begin
      failures++;
      if (failures < 10)
        $display("FAIL X=%0d x1=%0d x2=%0d x3=%0d sign=%b want=%b", x, x1, x2, x3, sign, want);
    end
    x1_low = x1[N-1:0];
    w_ref  = ({1'b0, x2} >= {1'b0, x1_low} + (N+1)'(x1[N]));
    sum3   = ~{x1[N-2:0], x1[N]} + x2 + x3;
    if (w_ref) n_w1++; else n_w0++;
    if (x2 == x1_low && !x1[N]) n_eq_top0++;
    if (x2 == x1_low &&  x1[N]) n_eq_top1++;
    if (w_ref && sum3[N-2:0] == '1) n_prop_w++; else n_gen++;
    if (want) n_neg++; else n_pos++;
    #4;
  endtask

  initial begin
    check_x(0);
    check_x(M / 2 - 1);
    check_x(M / 2);
    check_x(M - 1);
    for (int k = 0; k < NRAND; k++) begin
      check_x({$urandom, $urandom} % M);
    end
    for (longint unsigned k = 0; k < WIN; k++) begin
      check_x(k);
      check_x(M / 2 - WIN / 2 + k);
      check_x(M - 1 - k);
    end
    $display("mechanisms: W=1 %0d, W=0 %0d, x2==x1' with x1[N]=0 %0d / =1 %0d, sign bit not flipped by W %0d, flipped by W %0d, negative %0d, non-negative %0d",
             n_w1, n_w0, n_eq_top0, n_eq_top1, n_gen, n_prop_w, n_neg, n_pos);
    if (n_w1 == 0 || n_w0 == 0 || n_eq_top0 == 0 || n_eq_top1 == 0 ||
        n_gen == 0 || n_prop_w == 0 || n_neg == 0 || n_pos == 0) begin
      failures++;
      $display("FAIL: a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
