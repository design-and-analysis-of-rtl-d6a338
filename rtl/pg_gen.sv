// pg_gen: pre-processing stage of a parallel prefix adder.
//
// For every bit position it forms the bit generate g_i = a_i AND b_i and the
// bit propagate p_i = a_i XOR b_i. These are the spans i:i that the prefix
// network combines. Purely combinational; N outputs of each kind for N operand
// bits. The equations are the standard pre-processing equations; the width
// parameter defaults to the 8 bits of the adders this library is built around.
module pg_gen #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] g,
  output logic [N-1:0] p
);

  always_comb begin
    g = a & b;
    p = a ^ b;
  end

endmodule
