// ppa_adders_top: the two 8-bit parallel prefix adders, side by side.
//
// The Kogge-Stone adder (with carry in, four prefix levels, low fan-out and
// many cells) and the Han-Carlson adder (no carry in, odd-bit prefix network
// plus one carry-merge level, fewer cells and wires) are two answers to the
// same problem and do not share signals. Each keeps its own operand and result
// ports here: ks_* for the Kogge-Stone adder, hc_* for the Han-Carlson adder.
// N sets the width of both; its default is the 8 bits both adders are drawn
// with. Purely combinational.
module ppa_adders_top #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] ks_a,
  input  logic [N-1:0] ks_b,
  input  logic         ks_cin,
  output logic [N-1:0] ks_sum,
  output logic         ks_cout,
  input  logic [N-1:0] hc_a,
  input  logic [N-1:0] hc_b,
  output logic [N-1:0] hc_sum,
  output logic         hc_cout
);

  kogge_stone_adder #(.N(N)) u_ksa (
    .a(ks_a), .b(ks_b), .cin(ks_cin), .sum(ks_sum), .cout(ks_cout)
  );

  han_carlson_adder #(.N(N)) u_hca (
    .a(hc_a), .b(hc_b), .sum(hc_sum), .cout(hc_cout)
  );

endmodule
