// Self-checking testbench for post_proc_unit.
//
// Applies all 16 input combinations. The expected sign is bit 0 of
// p_msb + carry, where the carry into the top bit is worked out case by case:
// 1 when the low group generates, W when it only propagates, 0 otherwise.
// Combinational: outputs are sampled 1 ns after the inputs change.
module tb_post_proc_unit;
  logic p_msb, g_grp, p_grp, w, sign;
  int checks = 0, failures = 0;

  post_proc_unit dut (.p_msb(p_msb), .g_grp(g_grp), .p_grp(p_grp), .w(w), .sign(sign));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int carry;
    logic [1:0] total;
    for (int v = 0; v < 16; v++) begin
      {p_msb, g_grp, p_grp, w} = 4'(v);
      #1;
      if (g_grp)      carry = 1;
      else if (p_grp) carry = int'(w);
      else            carry = 0;
      total = 2'(int'(p_msb) + carry);
      checks++;
      if (sign !== total[0]) begin
        failures++;
        $display("FAIL p_msb=%b g=%b p=%b w=%b sign=%b", p_msb, g_grp, p_grp, w, sign);
      end
      #4;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
