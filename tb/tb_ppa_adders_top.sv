// tb_ppa_adders_top: end-to-end check of both adders at their default width.
//
// The top is instantiated with no parameter overrides (8-bit adders). Every
// operand combination is applied: 2^17 (a, b, cin) triples to the Kogge-Stone
// adder and 2^16 (a, b) pairs to the Han-Carlson adder, at the same time, and
// each result is compared with integer addition. The run also counts how often
// each carry mechanism of the two prefix networks was exercised and fails if
// any never occurred:
//   ks_cin_used    - the carry in passed bit 0 into the prefix network
//   ks_full_ripple - the carry in travelled through all 8 bits to C8
//   ks_cout        - the Kogge-Stone adder produced a carry out
//   hc_full_ripple - a carry generated at bit 0 travelled through all 8 bits
//   hc_merge       - a carry into an odd bit came only from the even-bit
//                    carry-merge row (bit i-1 even, propagating, not generating)
//   hc_cout        - the Han-Carlson adder produced a carry out
// A watchdog ends the run with a failure if it hangs.
module tb_ppa_adders_top;
  logic [7:0] ks_a, ks_b, ks_sum, hc_a, hc_b, hc_sum;
  logic       ks_cin, ks_cout, hc_cout;
  int checks = 0, failures = 0;
  int ks_cin_used = 0, ks_full_ripple = 0, ks_cout_n = 0;
  int hc_full_ripple = 0, hc_merge = 0, hc_cout_n = 0;

  ppa_adders_top dut (
    .ks_a(ks_a), .ks_b(ks_b), .ks_cin(ks_cin), .ks_sum(ks_sum), .ks_cout(ks_cout),
    .hc_a(hc_a), .hc_b(hc_b), .hc_sum(hc_sum), .hc_cout(hc_cout)
  );

  task automatic expect_count(input string name, input int n);
    checks++;
    $display("%-15s occurred %0d times", name, n);
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism %s never exercised", name);
    end
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 256; x++) begin
      for (int y = 0; y < 256; y++) begin
        for (int c = 0; c < 2; c++) begin
          int ks_exp, hc_exp;
          ks_a = 8'(x); ks_b = 8'(y); ks_cin = 1'(c);
          // The Han-Carlson adder sees each pair once, the other operand
          // order on the second pass, so both adders switch together.
          hc_a = (c == 0) ? 8'(x) : 8'(y);
          hc_b = (c == 0) ? 8'(y) : 8'(x);
          #1;
          ks_exp = x + y + c;
          hc_exp = int'(hc_a) + int'(hc_b);
          checks += 2;
          if ({ks_cout, ks_sum} != 9'(ks_exp)) begin
            failures++;
            if (failures < 10)
              $display("FAIL ks %h + %h + %b = %b_%h, expected %h", ks_a, ks_b, ks_cin,
                       ks_cout, ks_sum, ks_exp);
          end
          if ({hc_cout, hc_sum} != 9'(hc_exp)) begin
            failures++;
            if (failures < 10)
              $display("FAIL hc %h + %h = %b_%h, expected %h", hc_a, hc_b,
                       hc_cout, hc_sum, hc_exp);
          end
          if (c == 1 && (ks_a[0] ^ ks_b[0])) ks_cin_used++;
          if (c == 1 && (ks_a ^ ks_b) == 8'hFF && ks_cout) ks_full_ripple++;
          if (ks_cout) ks_cout_n++;
          if (((hc_a ^ hc_b) & 8'hFE) == 8'hFE && (hc_a[0] & hc_b[0]) && hc_cout)
            hc_full_ripple++;
          for (int i = 2; i < 8; i += 2) begin
            // Carry out of even bit i (into odd bit i+1) that bit i only passed on.
            if ((hc_a[i] ^ hc_b[i]) && (((int'(hc_a) & ((1 << i) - 1)) +
                                         (int'(hc_b) & ((1 << i) - 1))) >> i) != 0)
              hc_merge++;
          end
          if (hc_cout) hc_cout_n++;
        end
      end
    end
    expect_count("ks_cin_used", ks_cin_used);
    expect_count("ks_full_ripple", ks_full_ripple);
    expect_count("ks_cout", ks_cout_n);
    expect_count("hc_full_ripple", hc_full_ripple);
    expect_count("hc_merge", hc_merge);
    expect_count("hc_cout", hc_cout_n);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
