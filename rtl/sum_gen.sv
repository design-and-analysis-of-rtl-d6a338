// sum_gen: post-processing stage of a parallel prefix adder.
//
// Each sum bit is the bit propagate XOR the carry into that bit:
// S_i = p_i XOR C_{i-1}, where C_{i-1} = G[i-1:0] is the prefix generate of all
// bits below i (including the carry in where the adder has one). Input c[i]
// is that carry into bit i. Combinational; the carry out of the adder is taken
// straight from the prefix network and does not pass through this block.
module sum_gen #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] p,
  input  logic [N-1:0] c,
  output logic [N-1:0] sum
);

  always_comb sum = p ^ c;

endmodule
