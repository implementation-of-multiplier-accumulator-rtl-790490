// Self-checking testbench for vedic_mul_4x4: applies every pair of 4-bit unsigned
// operands and compares the 8-bit product with the arithmetic product
// worked out by the testbench. The multiplier is combinational, so each
// result is sampled 1 ns after the operands change.
module tb_vedic_mul_4x4;
  logic [3:0] a, b;
  logic [7:0] p;
  int checks = 0, failures = 0;

  vedic_mul_4x4 dut (.a(a), .b(b), .p(p));

  initial begin : watchdog
    #(64'd10_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << 4); i++) begin
      for (int j = 0; j < (1 << 4); j++) begin
        logic [7:0] expected;
        a = 4'(i);
        b = 4'(j);
        #1;
        expected = 8'(i) * 8'(j);
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
