// black_cell: prefix operator that produces both group signals.
//
// Given the group pair of an upper span i:k (hi) and of the adjacent lower span
// k-1:j (lo), it returns the pair of the merged span i:j:
//   G[i:j] = G[i:k] + P[i:k] G[k-1:j]
//   P[i:j] = P[i:k] P[k-1:j]
// It is one AND-OR for the generate and one AND for the propagate; used where
// a later stage still needs the propagate of the merged span. Combinational.
module black_cell
  import ppa_pkg::*;
(
  input  gp_t hi,
  input  gp_t lo,
  output gp_t out
);

  always_comb begin
    out.g = hi.g | (hi.p & lo.g);
    out.p = hi.p & lo.p;
  end

endmodule
