// Comparator unit of the sign detector.
//
// Compares two N-bit unsigned words and reports a > b and a == b. It is the
// carry network of the addition a + ~b, one input taken in ones complement:
//   a + ~b = a - b - 1 + 2^N, so the carry out of the N positions, the group
//   generate G[N-1:0], is 1 exactly when a - b - 1 >= 0, i.e. a > b;
//   every position propagates, group P[N-1:0] = 1, exactly when a ^ ~b is all
//   ones, i.e. a == b.
// The design uses it with a = x2 and b = x1' (the low N bits of x1). The
// group pair comes from the same logarithmic tree of black cells as the carry
// generation unit (16 positions in 4 levels for N = 16). The ones-complement
// input and the mapping G -> greater, P -> equal follow the design; the
// pairwise tree shape is this implementation's choice.
// Purely combinational; no clock.
module comparator_unit
  import rns_sd_pkg::*;
#(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic         gt,   // a > b
  output logic         eq    // a == b
);

  gp_t [N-1:0] leaf;
  gp_t         group;

  always_comb begin
    for (int i = 0; i < N; i++) begin
      leaf[i] = gp_bit(a[i], ~b[i]);
    end
  end

  gp_tree #(.W(N)) u_tree (
    .leaf  (leaf),
    .group (group)
  );

  assign gt = group.g;
  assign eq = group.p;

endmodule
