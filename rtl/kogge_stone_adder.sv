// kogge_stone_adder: N-bit Kogge-Stone parallel prefix adder with carry in.
//
// Structure (pre-processing -> prefix network -> post-processing):
//   * pg_gen forms g_i = a_i b_i and p_i = a_i ^ b_i.
//   * The carry in is treated as one extra prefix position below bit 0, with
//     generate = cin and no propagate, so the network has M = N+1 positions
//     (position 0 = cin, position i+1 = bit i).
//   * The prefix network has STAGES = ceil(log2(M)) levels (4 for N = 8). At
//     stage s every position e at or above the distance d = 2^(s-1) merges its
//     span with the span of position e-d (recursive doubling):
//       - a grey cell where the merged span reaches the carry in (e < 2d): the
//         result is already a finished carry and only G is kept;
//       - a black cell otherwise (G and P kept for later stages);
//       - positions below d pass straight on (the buffers of the graph).
//     For N = 8 this gives 7 black + 1 grey, 5 black + 2 grey, 1 black + 4 grey
//     and 1 grey cell in stages 1 to 4, as in the published 8-bit graph.
//   * After the last stage position e holds G[e-1:cin], the carry into bit e;
//     sum_gen forms S_i = p_i ^ C_{i-1}, and cout = G[N-1:cin] (C8 for N = 8).
// The grey/black placement and the four-stage depth follow the published
// 8-bit graph; extending the same rule to any N is this design's choice.
// Purely combinational: the result is valid one logic-propagation delay after
// the operands settle.
module kogge_stone_adder
  import ppa_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] sum,
  output logic         cout
);

  localparam int unsigned M      = N + 1;       // prefix positions incl. carry in
  localparam int unsigned STAGES = $clog2(M);   // prefix levels

  logic [N-1:0] g, p;
  logic [N-1:0] carry;                          // carry into each bit

  pg_gen #(.N(N)) u_pre (.a(a), .b(b), .g(g), .p(p));

  // One generate block per prefix level s holds that level's group generate
  // and propagate, G[e] and P[e], for every position e. P is only meaningful
  // for spans that do not yet reach the carry in.
  for (genvar s = 0; s <= STAGES; s++) begin : g_stage
    logic [M-1:0] G, P;
    if (s == 0) begin : g_lvl0
      // The carry in, then the bit generate/propagate pairs.
      assign G = {g, cin};
      assign P = {p, 1'b0};
    end else begin : g_lvl
      localparam int unsigned D = 1 << (s - 1);
      for (genvar e = 0; e < M; e++) begin : g_pos
        if (e < D) begin : g_buf
          assign G[e] = g_stage[s-1].G[e];
          assign P[e] = g_stage[s-1].P[e];
        end else if (e < 2 * D) begin : g_grey
          gp_t hi;
          assign hi = '{g: g_stage[s-1].G[e], p: g_stage[s-1].P[e]};
          grey_cell u_cell (.hi(hi), .g_lo(g_stage[s-1].G[e-D]), .g_out(G[e]));
          // Span reaches the carry in: no propagate is kept.
          assign P[e] = 1'b0;
        end else begin : g_black
          gp_t hi, lo, o;
          assign hi = '{g: g_stage[s-1].G[e],   p: g_stage[s-1].P[e]};
          assign lo = '{g: g_stage[s-1].G[e-D], p: g_stage[s-1].P[e-D]};
          black_cell u_cell (.hi(hi), .lo(lo), .out(o));
          assign G[e] = o.g;
          assign P[e] = o.p;
        end
      end
    end
  end

  // Position i of the last level holds G[i-1:cin], the carry into bit i.
  assign carry = g_stage[STAGES].G[N-1:0];

  sum_gen #(.N(N)) u_post (.p(p), .c(carry), .sum(sum));

  assign cout = g_stage[STAGES].G[N];

endmodule
