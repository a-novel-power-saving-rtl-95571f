// Self-checking testbench for comparator_unit.
//
// Drives random word pairs, equal pairs, pairs one apart and all-zero /
// all-ones corners, and checks gt against a > b and eq against a == b as
// computed by the simulator's own comparison operators. The unit is
// combinational: outputs are sampled 1 ns after the inputs change.
module tb_comparator_unit;
  localparam int unsigned N = 16;
  localparam int unsigned NVEC = 20000;

  logic [N-1:0] a, b;
  logic gt, eq;
  int checks = 0, failures = 0;
  int n_gt = 0, n_eq = 0, n_lt = 0;

  comparator_unit dut (.a(a), .b(b), .gt(gt), .eq(eq));

  initial begin : watchdog
    #(NVEC * 40 + 100000);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(input logic [N-1:0] ta, tb);
    a = ta; b = tb;
    #1;
    checks++;
    if (gt !== (ta > tb) || eq !== (ta == tb)) begin
      failures++;
      $display("FAIL a=%h b=%h gt=%b eq=%b", ta, tb, gt, eq);
    end
    if (ta > tb) n_gt++; else if (ta == tb) n_eq++; else n_lt++;
    #4;
  endtask

  initial begin
    logic [N-1:0] r;
    check_one('0, '0);
    check_one('1, '1);
    check_one('1, '0);
    check_one('0, '1);
    for (int k = 0; k < NVEC; k++) begin
      r = N'($urandom);
      check_one(N'($urandom), N'($urandom));
      check_one(r, r);
      check_one(r, r + 1'b1);
      check_one(r + 1'b1, r);
      // differ only in one random bit position
      check_one(r, r ^ (N'(1) << ($urandom % N)));
    end
    if (n_gt == 0 || n_eq == 0 || n_lt == 0) begin
      failures++;
      $display("FAIL: an outcome never occurred gt=%0d eq=%0d lt=%0d", n_gt, n_eq, n_lt);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
