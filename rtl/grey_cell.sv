// grey_cell: prefix operator that produces only the group generate.
//
// Given the group pair of an upper span i:k (hi) and the group generate of the
// adjacent lower span k-1:j (g_lo), it returns G[i:j] = G[i:k] + P[i:k] G[k-1:j].
// It is used where the merged span already reaches bit 0 (or the carry in),
// so G[i:j] is a finished carry and its propagate is never needed again.
// Combinational.
module grey_cell
  import ppa_pkg::*;
(
  input  gp_t  hi,
  input  logic g_lo,
  output logic g_out
);

  always_comb g_out = hi.g | (hi.p & g_lo);

endmodule
