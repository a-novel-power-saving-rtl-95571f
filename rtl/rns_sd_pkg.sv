// Shared types and cell functions for the RNS sign detector.
//
// The sign detector is built from two prefix-style carry networks (the carry
// generation unit and the comparator). Both use the same three cells:
//   - the bit cell (square): G = a AND b, P = a XOR b for one bit position;
//   - the black cell: merges a more significant group (i:k) with the adjacent
//     less significant group (k-1:j) into (i:j):
//       G(i:j) = G(i:k) OR (P(i:k) AND G(k-1:j)),  P(i:j) = P(i:k) AND P(k-1:j);
//   - the white cell: passes a (G, P) pair through unchanged.
// This package holds the (G, P) pair type and the two functions that form the
// bit cell and the black cell. The cell set follows the design; packaging them
// as functions is this implementation's choice.
package rns_sd_pkg;

  // Generate / propagate pair of one bit position or of a group of positions.
  typedef struct packed {
    logic g;
    logic p;
  } gp_t;

  // Bit cell: generate and propagate of a single position a + b.
  function automatic gp_t gp_bit(input logic a, input logic b);
    gp_t r;
    r.g = a & b;
    r.p = a ^ b;
    return r;
  endfunction

  // Black cell: hi is the more significant group, lo the adjacent lower one.
  function automatic gp_t gp_merge(input gp_t hi, input gp_t lo);
    gp_t r;
    r.g = hi.g | (hi.p & lo.g);
    r.p = hi.p & lo.p;
    return r;
  endfunction

endpackage
