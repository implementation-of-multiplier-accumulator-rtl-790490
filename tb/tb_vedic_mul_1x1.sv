// Self-checking testbench for vedic_mul_1x1: applies every pair of 1-bit
// operands and compares the product bit with the AND
// worked out by the testbench. The multiplier is combinational, so each
// result is sampled 1 ns after the operands change.
module tb_vedic_mul_1x1;
  logic a, b;
  logic p;
  int checks = 0, failures = 0;

  vedic_mul_1x1 dut (.a(a), .b(b), .p(p));

  initial begin : watchdog
    #(64'd10_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << 1); i++) begin
      for (int j = 0; j < (1 << 1); j++) begin
        logic expected;
        a = i[0];
        b = j[0];
        #1;
        expected = i[0] & j[0];
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
