// tb_pg_gen: exhaustive check of the pre-processing stage.
//
// Drives all 2^16 pairs of 8-bit operands and compares each bit of g and p
// with a per-bit truth-table model (generate when both bits are 1, propagate
// when exactly one is). A watchdog ends the run with a failure if it hangs.
module tb_pg_gen;
  localparam int unsigned N = 8;

  logic [N-1:0] a, b, g, p;
  int checks = 0, failures = 0;

  pg_gen #(.N(N)) dut (.a(a), .b(b), .g(g), .p(p));

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < (1 << N); x++) begin
      for (int y = 0; y < (1 << N); y++) begin
        a = N'(x);
        b = N'(y);
        #1;
        for (int i = 0; i < N; i++) begin
          logic eg, ep;
          eg = (a[i] == 1'b1 && b[i] == 1'b1);
          ep = (a[i] != b[i]);
          checks++;
          if (g[i] !== eg || p[i] !== ep) begin
            failures++;
            if (failures < 10)
              $display("FAIL a=%h b=%h bit %0d: g=%b p=%b expected g=%b p=%b",
                       a, b, i, g[i], p[i], eg, ep);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
