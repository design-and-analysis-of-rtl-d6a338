// tb_sum_gen: exhaustive check of the post-processing sum block.
//
// Drives all 2^16 combinations of 8 propagate bits and 8 carries and checks
// every sum bit: it is 1 exactly when one of p_i and the carry into bit i is 1.
module tb_sum_gen;
  localparam int unsigned N = 8;

  logic [N-1:0] p, c, sum;
  int checks = 0, failures = 0;

  sum_gen #(.N(N)) dut (.p(p), .c(c), .sum(sum));

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
        p = N'(x);
        c = N'(y);
        #1;
        for (int i = 0; i < N; i++) begin
          checks++;
          if (sum[i] !== (p[i] != c[i])) begin
            failures++;
            if (failures < 10) $display("FAIL p=%h c=%h bit %0d: sum=%h", p, c, i, sum);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
