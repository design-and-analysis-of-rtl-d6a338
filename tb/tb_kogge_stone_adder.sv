// tb_kogge_stone_adder: checks the Kogge-Stone adder against integer addition.
//
// The 8-bit adder is checked exhaustively: all 2^17 combinations of a, b and
// carry in, comparing {cout, sum} with a + b + cin computed in 64-bit integer
// arithmetic. Wider instances (16, 24 and 32 bits) get 20,000 random vectors
// each plus the all-propagate corner cases. The prefix depth of the 8-bit
// adder must be four levels. A watchdog ends the run with a failure if it hangs.
module tb_kogge_stone_adder;
  int checks = 0, failures = 0;

  logic [7:0]  a8,  b8,  s8;
  logic [15:0] a16, b16, s16;
  logic [23:0] a24, b24, s24;
  logic [31:0] a32, b32, s32;
  logic        cin, co8, co16, co24, co32;

  kogge_stone_adder #(.N(8))  dut8  (.a(a8),  .b(b8),  .cin(cin), .sum(s8),  .cout(co8));
  kogge_stone_adder #(.N(16)) dut16 (.a(a16), .b(b16), .cin(cin), .sum(s16), .cout(co16));
  kogge_stone_adder #(.N(24)) dut24 (.a(a24), .b(b24), .cin(cin), .sum(s24), .cout(co24));
  kogge_stone_adder #(.N(32)) dut32 (.a(a32), .b(b32), .cin(cin), .sum(s32), .cout(co32));

  task automatic check(input string tag, input longint unsigned got,
                       input longint unsigned expected);
    checks++;
    if (got != expected) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h", tag, got, expected);
    end
  endtask

  task automatic drive_wide(input logic [31:0] x, input logic [31:0] y, input logic c);
    a16 = x[15:0]; b16 = y[15:0];
    a24 = x[23:0]; b24 = y[23:0];
    a32 = x;       b32 = y;
    cin = c;
    #1;
    check("ks16", 64'({co16, s16}), longint'(a16) + longint'(b16) + longint'(cin));
    check("ks24", 64'({co24, s24}), longint'(a24) + longint'(b24) + longint'(cin));
    check("ks32", 64'({co32, s32}), longint'(a32) + longint'(b32) + longint'(cin));
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    checks++;
    if (dut8.STAGES != 4) begin
      failures++;
      $display("FAIL 8-bit prefix depth %0d, expected 4", dut8.STAGES);
    end
    a16 = '0; b16 = '0; a24 = '0; b24 = '0; a32 = '0; b32 = '0;
    for (int x = 0; x < 256; x++) begin
      for (int y = 0; y < 256; y++) begin
        for (int c = 0; c < 2; c++) begin
          a8 = 8'(x); b8 = 8'(y); cin = 1'(c);
          #1;
          check("ks8", 64'({co8, s8}), longint'(x) + longint'(y) + longint'(c));
        end
      end
    end
    // Carry in rippling through every bit, and carry generated at bit 0 only.
    drive_wide(32'hFFFF_FFFF, 32'h0, 1'b1);
    drive_wide(32'hFFFF_FFFE, 32'h1, 1'b0);
    drive_wide(32'h8000_0000, 32'h8000_0000, 1'b1);
    for (int n = 0; n < 20000; n++)
      drive_wide($urandom, $urandom, 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
