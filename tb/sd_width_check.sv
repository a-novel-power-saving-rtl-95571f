// Checker used by tb_rns_sign_detector_widths: runs one sign detector of size
// N against the reference X >= M/2.
//
// With EXHAUSTIVE set it walks every X in [0, M); otherwise it applies NRAND
// random X plus every X in windows of WIN values at 0, M/2 and below M.
// Residues are formed with the simulator's % operator on 128-bit integers,
// which holds M for N up to 32. Raises done when finished and reports its
// check and failure counts.
module sd_width_check #(
  parameter int unsigned N          = 8,
  parameter bit          EXHAUSTIVE = 1'b1,
  parameter int unsigned NRAND      = 1000,
  parameter int unsigned WIN        = 1000
) (
  output logic done,
  output int   checks,
  output int   failures
);
  localparam logic [127:0] M1 = (128'd1 << (N + 1)) - 1;
  localparam logic [127:0] M2 = (128'd1 << N) - 1;
  localparam logic [127:0] M3 = 128'd1 << N;
  localparam logic [127:0] M  = M1 * M2 * M3;

  logic [N:0]   x1;
  logic [N-1:0] x2, x3;
  logic         sign;

  rns_sign_detector #(.N(N)) dut (.x1(x1), .x2(x2), .x3(x3), .sign(sign));

  task automatic check_x(input logic [127:0] x);
    logic want;
    x1 = (N+1)'(x % M1);
    x2 = N'(x % M2);
    x3 = N'(x % M3);
    #1;
    want = (x >= M / 2);
    checks++;
    if (sign !== want) begin
      failures++;
      if (failures < 10)
        $display("FAIL N=%0d X=%0d x1=%0d x2=%0d x3=%0d sign=%b want=%b",
                 N, x, x1, x2, x3, sign, want);
    end
    #1;
  endtask

  initial begin
    done = 1'b0;
    checks = 0;
    failures = 0;
    if (EXHAUSTIVE) begin
      for (logic [127:0] x = 0; x < M; x++) check_x(x);
    end else begin
      for (int k = 0; k < NRAND; k++)
        check_x({$urandom, $urandom, $urandom, $urandom} % M);
      for (int k = 0; k < WIN; k++) begin
        check_x(128'(k));
        check_x(M / 2 - 128'(WIN) / 2 + 128'(k));
        check_x(M - 1 - 128'(k));
      end
    end
    $display("N=%0d: %0d checks, %0d failures", N, checks, failures);
    done = 1'b1;
  end
endmodule
