// tb_grey_cell: exhaustive check of the grey prefix cell.
//
// Applies all 8 combinations of the upper group pair and the lower group
// generate and compares the merged generate with a case-analysis model.
module tb_grey_cell;
  import ppa_pkg::*;

  gp_t  hi;
  logic g_lo, g_out;
  int checks = 0, failures = 0;

  grey_cell dut (.hi(hi), .g_lo(g_lo), .g_out(g_out));

  initial begin
    #10_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      logic eg;
      hi   = gp_t'(v[2:1]);
      g_lo = v[0];
      #1;
      if (hi.g) eg = 1'b1;
      else if (hi.p) eg = g_lo;
      else eg = 1'b0;
      checks++;
      if (g_out !== eg) begin
        failures++;
        $display("FAIL hi=%b g_lo=%b: g_out=%b expected %b", hi, g_lo, g_out, eg);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
