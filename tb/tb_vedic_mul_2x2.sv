// Self-checking testbench for vedic_mul_2x2: applies every pair of 2-bit unsigned
// operands and compares the 4-bit product with the arithmetic product
// worked out by the testbench. The multiplier is combinational, so each
// result is sampled 1 ns after the operands change.
module tb_vedic_mul_2x2;
  logic [1:0] a, b;
  logic [3:0] p;
  int checks = 0, failures = 0;

  vedic_mul_2x2 dut (.a(a), .b(b), .p(p));

  initial begin : watchdog
    #(64'd10_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << 2); i++) begin
      for (int j = 0; j < (1 << 2); j++) begin
        logic [3:0] expected;
        a = 2'(i);
        b = 2'(j);
        #1;
        expected = 4'(i) * 4'(j);
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
