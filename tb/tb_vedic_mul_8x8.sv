// Self-checking testbench for vedic_mul_8x8: applies every pair of 8-bit unsigned
// operands and compares the 16-bit product with the arithmetic product
// worked out by the testbench. The multiplier is combinational, so each
// result is sampled 1 ns after the operands change.
module tb_vedic_mul_8x8;
  logic [7:0] a, b;
  logic [15:0] p;
  int checks = 0, failures = 0;

  vedic_mul_8x8 dut (.a(a), .b(b), .p(p));

  initial begin : watchdog
    #(64'd10_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << 8); i++) begin
      for (int j = 0; j < (1 << 8); j++) begin
        logic [15:0] expected;
        a = 8'(i);
        b = 8'(j);
        #1;
        expected = 16'(i) * 16'(j);
        checks++;
        if (p !== expected) begin
          failures++;
          if (failures < 10) $display("FAIL %0d * %0d = %0d, expected %0d", a, b, p, expected);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
