// Group generate/propagate reduction tree.
//
// Reduces W per-bit (G, P) pairs, leaf[0] the least significant, to the single
// pair of the whole group, G[W-1:0] and P[W-1:0]. Group G is 1 when the W
// positions produce a carry out by themselves; group P is 1 when a carry into
// position 0 would travel through all of them.
//
// Structure: a logarithmic tree of black cells built level by level. On each
// level adjacent nodes are merged pairwise from the least significant end
// (node 2j+1 over node 2j gives node j of the next level); an odd node left at
// the top of a level passes through a white cell. W positions need
// ceil(log2 W) levels and W-1 black cells, e.g. 4 levels for 15 or 16
// positions. Only the final group pair is formed, not the intermediate
// prefixes, since the sign detector needs a single carry. The pairwise shape
// is this implementation's reading of the tree drawings; any tree computing
// the same group pair is equivalent.
//
// Purely combinational; no clock.
module gp_tree
  import rns_sd_pkg::*;
#(
  parameter int unsigned W = 16
) (
  input  gp_t [W-1:0] leaf,
  output gp_t         group
);

  localparam int LEVELS = (W > 1) ? $clog2(W) : 0;

  // Walks the levels on a local copy: node j of a level is written only
  // after nodes 2j and 2j+1 of the level below have been read.
  function automatic gp_t reduce(input gp_t [W-1:0] v);
    gp_t [W-1:0] node;
    int live;
    node = v;
    live = int'(W);
    for (int l = 0; l < LEVELS; l++) begin
      for (int j = 0; j < int'((W + 1) / 2); j++) begin
        if (2 * j + 1 < live) begin
          node[j] = gp_merge(node[2*j+1], node[2*j]);    // black cell
        end else if (2 * j < live) begin
          node[j] = node[2*j];                           // white cell
        end
      end
      live = (live + 1) / 2;
    end
    return node[0];
  endfunction

  assign group = reduce(leaf);

endmodule
