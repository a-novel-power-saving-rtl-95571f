// Testbench of the sign detector at other sizes n: every X of the whole range
// for n = 2 to 8 (n = 8: moduli 511, 255, 256, M = 33,358,080) and random X
// plus windows at 0, M/2 and M for n = 32 (moduli 2^33-1, 2^32-1, 2^32).
// Each size runs in its own sd_width_check instance; the result line sums them.
module tb_rns_sign_detector_widths;
  localparam int NCFG = 8;
  localparam int unsigned SIZES [NCFG] = '{2, 3, 4, 5, 6, 7, 8, 32};

  logic [NCFG-1:0] done;
  int chk [NCFG];
  int fl  [NCFG];

  for (genvar i = 0; i < NCFG; i++) begin : g_cfg
    sd_width_check #(
      .N          (SIZES[i]),
      .EXHAUSTIVE (SIZES[i] <= 8),
      .NRAND      (200000),
      .WIN        (20000)
    ) u_chk (.done(done[i]), .checks(chk[i]), .failures(fl[i]));
  end

  initial begin : watchdog
    #1000000000;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", 0, 1);
    $finish;
  end

  initial begin
    int checks, failures;
    wait (&done);
    checks = 0;
    failures = 0;
    for (int i = 0; i < NCFG; i++) begin
      checks   += chk[i];
      failures += fl[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
