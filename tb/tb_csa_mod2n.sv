// Self-checking testbench for csa_mod2n (carry-save adder modulo 2^N).
//
// Drives random and corner operand triples and checks, against plain integer
// arithmetic, that (2*cy + s) mod 2^N equals (a + b + c) mod 2^N, and that
// each carry bit is set exactly when at least two of the three operand bits
// of its position are set (counted with an adder, not with gates). The adder
// is combinational: outputs are sampled 1 ns after the inputs change.
module tb_csa_mod2n;
  localparam int unsigned N = 16;
  localparam int unsigned NVEC = 20000;

  logic [N-1:0] a, b, c, s;
  logic [N-2:0] cy;
  int checks = 0, failures = 0;

  csa_mod2n dut (.a(a), .b(b), .c(c), .s(s), .cy(cy));

  initial begin : watchdog
    #(NVEC * 10 + 100000);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(input logic [N-1:0] ta, tb, tc);
    logic [N+1:0] want, got;
    int ones;
    a = ta; b = tb; c = tc;
    #1;
    want = (N+2)'(ta) + (N+2)'(tb) + (N+2)'(tc);
    got  = ((N+2)'(cy) << 1) + (N+2)'(s);
    checks++;
    if (want[N-1:0] !== got[N-1:0]) begin
      failures++;
      $display("FAIL sum: a=%h b=%h c=%h s=%h cy=%h", ta, tb, tc, s, cy);
    end
    for (int i = 0; i < N - 1; i++) begin
      ones = int'(ta[i]) + int'(tb[i]) + int'(tc[i]);
      checks++;
      if (cy[i] !== (ones >= 2)) begin
        failures++;
        $display("FAIL carry bit %0d: a=%h b=%h c=%h cy=%h", i, ta, tb, tc, cy);
      end
    end
    #4;
  endtask

  initial begin
    check_one('0, '0, '0);
    check_one('1, '1, '1);
    check_one('1, '0, '0);
    check_one('1, '1, '0);
    check_one({1'b1, {(N-1){1'b0}}}, {1'b1, {(N-1){1'b0}}}, '0);
    for (int k = 0; k < NVEC; k++) begin
      check_one(N'($urandom), N'($urandom), N'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
