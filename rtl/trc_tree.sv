// TRC-TREE: two-rail-code checker tree for N input pairs.
//
// Pair i is (a[i], b[i]); in the Berger checkers a[i] is the inverted
// counter bit ~y_i and b[i] the received check bit c_i, so every pair is
// complementary exactly when y_i = c_i. The output pair (z1,z2) is
// complementary iff all input pairs are; for code inputs z1 is the parity of
// the a-rails. N-1 two-variable TRC cells, depth ceil(log2 N) cells.
// Combinational.
//
// Topology (as in the reference structure): a tree over pairs [lo, lo+n)
// is a sub-tree TT-1 over the upper floor(n/2) pairs, a sub-tree TT-2 over
// the lower ceil(n/2) pairs, and one TRC comparing their outputs; a single
// pair is its own tree. The recursion is unrolled at elaboration time:
// the N-1 TRC cells are numbered in post-order (TT-2's cells, then TT-1's,
// then the node itself), and constant functions give every cell the
// signals of its two children. Signal ids 0..N-1 are the input pairs,
// N..2N-2 the cell outputs.
module trc_tree #(
  parameter int unsigned N = 3
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic         z1,
  output logic         z2
);
  // Signal id of one child of cell `target`, searching the tree over
  // pairs [lo, lo+n) whose cells are numbered from `base`.
  // upper = 1 selects the TT-1 child, 0 the TT-2 child.
  function automatic int child_id(input int lo, input int n, input int base,
                                  input int target, input bit upper);
    int n2, n1;
    n2 = n - n / 2;   // TT-2: lower ceil(n/2) pairs
    n1 = n / 2;       // TT-1: upper floor(n/2) pairs
    if (target == base + n - 2) begin
      if (upper) return (n1 == 1) ? lo + n2 : int'(N) + base + n2 - 1 + n1 - 2;
      else       return (n2 == 1) ? lo      : int'(N) + base + n2 - 2;
    end
    if (target < base + n2 - 1) return child_id(lo, n2, base, target, upper);
    return child_id(lo + n2, n1, base + n2 - 1, target, upper);
  endfunction

  if (N == 0) begin : g_bad_n
    $error("trc_tree: N must be at least 1");
  end else if (N == 1) begin : g_leaf
    assign z1 = a[0];
    assign z2 = b[0];
  end else begin : g_tree
    for (genvar i = 0; i < N - 1; i++) begin : g_node
      localparam int UP = child_id(0, N, 0, i, 1'b1);
      localparam int LO = child_id(0, N, 0, i, 1'b0);
      logic ai, bi, aj, bj;   // (ai,bi) from TT-1, (aj,bj) from TT-2
      logic f, g;

      if (UP < N) begin : g_up_pair
        assign ai = a[UP];
        assign bi = b[UP];
      end else begin : g_up_cell
        assign ai = g_node[UP-N].f;
        assign bi = g_node[UP-N].g;
      end
      if (LO < N) begin : g_lo_pair
        assign aj = a[LO];
        assign bj = b[LO];
      end else begin : g_lo_cell
        assign aj = g_node[LO-N].f;
        assign bj = g_node[LO-N].g;
      end

      trc u_trc (.ai(ai), .bi(bi), .aj(aj), .bj(bj), .f(f), .g(g));
    end
    assign z1 = g_node[N-2].f;
    assign z2 = g_node[N-2].g;
  end
endmodule
