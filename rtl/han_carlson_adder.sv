// han_carlson_adder: N-bit Han-Carlson parallel prefix adder (no carry in).
//
// Structure (pre-processing -> prefix network -> post-processing):
//   * pg_gen forms g_i = a_i b_i and p_i = a_i ^ b_i.
//   * Stages 1 .. L, L = ceil(log2(N)) (3 for N = 8), work on the odd bit
//     positions only; even positions pass straight on. At stage s, with
//     distance d = 2^(s-1), odd position i merges with position i-d:
//       - stage 1 (d = 1) pairs each odd bit with the even bit below it, the
//         Brent-Kung style first row;
//       - later stages form a Kogge-Stone network over the odd positions;
//       - a grey cell is used where the merged span reaches bit 0 (i < 2d),
//         a black cell otherwise, and positions with i < d pass on.
//     For N = 8: black 7:6, 5:4, 3:2 and grey 1:0; black 7:4, 5:2 and grey
//     3:0; grey 7:0 and 5:0.
//   * Stage L+1 is the extra carry-merge row: every even position i >= 2
//     gets a grey cell that merges g_i with G[i-1:0] from the odd column below.
//   * After stage L+1 every position i holds G[i:0]. sum_gen forms
//     S_i = p_i ^ G[i-1:0] (S_0 = p_0) and cout = G[N-1:0].
// Depth is L+1 prefix levels (4 for N = 8). The cell placement for N = 8
// follows the published 8-bit graph; extending it to other N is this design's
// choice. The published 8-bit graph has no carry in, and neither has this
// module. Purely combinational.
module han_carlson_adder
  import ppa_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] sum,
  output logic         cout
);

  localparam int unsigned L      = $clog2(N);   // odd-position prefix levels
  localparam int unsigned STAGES = L + 1;       // plus the even carry merge

  logic [N-1:0] g, p;
  logic [N-1:0] carry;                          // carry into each bit

  pg_gen #(.N(N)) u_pre (.a(a), .b(b), .g(g), .p(p));

  // One generate block per prefix level s holds that level's group generate
  // and propagate, G[i] and P[i], for every bit position i. P is only
  // meaningful for spans that do not yet reach bit 0.
  for (genvar s = 0; s <= STAGES; s++) begin : g_stage
    logic [N-1:0] G, P;
    if (s == 0) begin : g_lvl0
      assign G = g;
      assign P = p;
    end else if (s <= L) begin : g_odd
      // Odd-position network; even positions pass on.
      localparam int unsigned D = 1 << (s - 1);
      for (genvar i = 0; i < N; i++) begin : g_pos
        if ((i % 2 == 0) || (i < D)) begin : g_buf
          assign G[i] = g_stage[s-1].G[i];
          assign P[i] = g_stage[s-1].P[i];
        end else if (i < 2 * D) begin : g_grey
          gp_t hi;
          assign hi = '{g: g_stage[s-1].G[i], p: g_stage[s-1].P[i]};
          grey_cell u_cell (.hi(hi), .g_lo(g_stage[s-1].G[i-D]), .g_out(G[i]));
          // Span reaches bit 0: no propagate is kept.
          assign P[i] = 1'b0;
        end else begin : g_black
          gp_t hi, lo, o;
          assign hi = '{g: g_stage[s-1].G[i],   p: g_stage[s-1].P[i]};
          assign lo = '{g: g_stage[s-1].G[i-D], p: g_stage[s-1].P[i-D]};
          black_cell u_cell (.hi(hi), .lo(lo), .out(o));
          assign G[i] = o.g;
          assign P[i] = o.p;
        end
      end
    end else begin : g_merge
      // Final carry-merge row on the even positions.
      for (genvar i = 0; i < N; i++) begin : g_pos
        if ((i % 2 == 1) || (i == 0)) begin : g_buf
          assign G[i] = g_stage[s-1].G[i];
          assign P[i] = g_stage[s-1].P[i];
        end else begin : g_grey
          gp_t hi;
          assign hi = '{g: g_stage[s-1].G[i], p: g_stage[s-1].P[i]};
          grey_cell u_cell (.hi(hi), .g_lo(g_stage[s-1].G[i-1]), .g_out(G[i]));
          assign P[i] = 1'b0;
        end
      end
    end
  end

  // Position i of the last level holds G[i:0], the carry into bit i+1.
  assign carry = {g_stage[STAGES].G[N-2:0], 1'b0};

  sum_gen #(.N(N)) u_post (.p(p), .c(carry), .sum(sum));

  assign cout = g_stage[STAGES].G[N-1];

endmodule
