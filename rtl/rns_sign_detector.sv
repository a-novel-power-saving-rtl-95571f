// Sign detector for the residue number system {2^(N+1)-1, 2^N-1, 2^N}.
//
// A number X in [0, M), M = (2^(N+1)-1)(2^N-1)2^N, is held as its residues
// x1 = X mod (2^(N+1)-1) (N+1 bits), x2 = X mod (2^N-1) and x3 = X mod 2^N
// (N bits each). Read as a signed number, X is negative when X >= M/2. The
// sign is the top bit of the last mixed-radix digit
//   alpha2 = floor(X / ((2^(N+1)-1)(2^N-1))),   0 <= alpha2 < 2^N,
// and for this moduli set alpha2 reduces to an addition modulo 2^N:
//   alpha2 = (~x1'' + x2 + x3 + W) mod 2^N
// where x1'' = {x1[N-2:0], x1[N]} (the low N-1 bits of x1 rotated up by one,
// with the top bit x1[N] at the bottom), ~ is the N-bit ones complement, and
//   W = 1 when x2 >= x1' + x1[N], i.e. (x2 > x1') | (x2 == x1' & ~x1[N]),
// with x1' = x1[N-1:0]. W is the floor term floor((x2 - x1)/(2^N - 1)) plus
// the constant it shares with the ones complement.
//
// Datapath:
//   csa_mod2n       ~x1'', x2, x3  -> sum s (N bits), carry cy (N-1 bits)
//   comparator_unit x2 vs x1'      -> x2 > x1', x2 == x1'
//   W gates         W = gt | (eq & ~x1[N])
//   carry_gen_unit  s, cy          -> P(N-1), G[N-2:0], P[N-2:0]
//   post_proc_unit  those and W    -> sign = bit N-1 of 2*cy + s + W
// The block structure, the x1'' operand, the inverted CSA input and W follow
// the design. Inputs must be valid residues (x1 < 2^(N+1)-1, x2 < 2^N-1);
// other codes give an unspecified sign.
//
// Interface: x1, x2, x3 in, sign out (1 = negative). Purely combinational,
// with no clock or register: the sign follows the inputs after the
// propagation delay of one CSA level and two log2(N)-deep trees.
module rns_sign_detector #(
  parameter int unsigned N = 16   // n; the moduli are 2^(N+1)-1, 2^N-1, 2^N
) (
  input  logic [N:0]   x1,   // residue mod 2^(N+1)-1
  input  logic [N-1:0] x2,   // residue mod 2^N-1
  input  logic [N-1:0] x3,   // residue mod 2^N
  output logic         sign  // 1 when X >= M/2
);

  logic [N-1:0] x1_low;      // x1'
  logic         x1_top;      // x1[N]
  logic [N-1:0] x1_rot;      // x1''
  logic [N-1:0] csa_s;
  logic [N-2:0] csa_c;
  logic         x2_gt, x2_eq, w;
  logic         p_msb, g_grp, p_grp;

  assign x1_low = x1[N-1:0];
  assign x1_top = x1[N];
  assign x1_rot = {x1[N-2:0], x1_top};

  csa_mod2n #(.N(N)) u_csa (
    .a  (~x1_rot),
    .b  (x2),
    .c  (x3),
    .s  (csa_s),
    .cy (csa_c)
  );

  comparator_unit #(.N(N)) u_cmp (
    .a  (x2),
    .b  (x1_low),
    .gt (x2_gt),
    .eq (x2_eq)
  );

  assign w = x2_gt | (x2_eq & ~x1_top);

  carry_gen_unit #(.N(N)) u_cg (
    .s     (csa_s),
    .cy    (csa_c),
    .p_msb (p_msb),
    .g_grp (g_grp),
    .p_grp (p_grp)
  );

  post_proc_unit u_pp (
    .p_msb (p_msb),
    .g_grp (g_grp),
    .p_grp (p_grp),
    .w     (w),
    .sign  (sign)
  );

endmodule
