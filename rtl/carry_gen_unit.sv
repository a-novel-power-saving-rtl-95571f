// Carry generation unit of the sign detector.
//
// The sign is bit N-1 of alpha2 = (2*cy + s + W) mod 2^N, where (s, cy) come
// from the carry-save adder and W is a carry-in. This unit prepares the three
// signals the post-processing unit needs to form that bit:
//   p_msb = P(N-1) = s[N-1] ^ cy[N-2], the bit propagate of the top position;
//   g_grp = G[N-2:0], p_grp = P[N-2:0], the group generate / propagate of the
//           lower N-1 positions of 2*cy + s.
// Position 0 of 2*cy + s has no carry operand, so its bit cell sees (0, s[0]):
// G = 0, P = s[0]. Positions 1..N-2 see (cy[i-1], s[i]).
//
// The group pair comes from a logarithmic tree of black cells (gp_tree); for
// N = 16 that is 15 positions in 4 levels. Only the one carry into the top bit
// is formed, not a full sum, as the design calls for. The cell functions
// follow the design; the pairwise tree shape is this implementation's choice.
// Purely combinational; no clock.
module carry_gen_unit
  import rns_sd_pkg::*;
#(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0] s,
  input  logic [N-2:0] cy,      // cy[i] has weight 2^(i+1)
  output logic         p_msb,   // P(N-1)
  output logic         g_grp,   // G[N-2:0]
  output logic         p_grp    // P[N-2:0]
);

  gp_t [N-2:0] leaf;
  gp_t         group;

  always_comb begin
    leaf[0] = gp_bit(1'b0, s[0]);
    for (int i = 1; i <= N - 2; i++) begin
      leaf[i] = gp_bit(cy[i-1], s[i]);
    end
  end

  gp_tree #(.W(N - 1)) u_tree (
    .leaf  (leaf),
    .group (group)
  );

  assign p_msb = s[N-1] ^ cy[N-2];
  assign g_grp = group.g;
  assign p_grp = group.p;

endmodule
