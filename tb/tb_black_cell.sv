// tb_black_cell: exhaustive check of the black prefix cell.
//
// Applies all 16 combinations of the upper and lower group pairs and compares
// the merged pair with a case-analysis model: the span generates if the upper
// part generates, or if it propagates and the lower part generates; it
// propagates only if both parts propagate.
module tb_black_cell;
  import ppa_pkg::*;

  gp_t hi, lo, out;
  int checks = 0, failures = 0;

  black_cell dut (.hi(hi), .lo(lo), .out(out));

  initial begin
    #10_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      logic eg, ep;
      hi = gp_t'(v[3:2]);
      lo = gp_t'(v[1:0]);
      #1;
      if (hi.g) eg = 1'b1;
      else if (hi.p) eg = lo.g;
      else eg = 1'b0;
      ep = hi.p ? lo.p : 1'b0;
      checks++;
      if (out.g !== eg || out.p !== ep) begin
        failures++;
        $display("FAIL hi=%b lo=%b: out=%b expected g=%b p=%b", hi, lo, out, eg, ep);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
