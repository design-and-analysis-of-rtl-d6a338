// ppa_pkg: types shared by the parallel prefix adders.
//
// A prefix node carries a pair of signals for a span of bits i:j: the group
// generate G[i:j] (the span produces a carry by itself) and the group propagate
// P[i:j] (the span passes an incoming carry through). gp_t bundles that pair so
// that black cells, grey cells and the prefix networks move it as one value.
package ppa_pkg;

  typedef struct packed {
    logic g;  // group generate G[i:j]
    logic p;  // group propagate P[i:j]
  } gp_t;

endpackage
