// Self-checking testbench for vedic_mul_16x16, the 16x16-bit Vedic
// multiplier. Applies the corner operands (0, 1, all ones, single bits,
// half-word boundaries) in every combination, then 200,000 random pairs, and
// compares the 32-bit product with the product computed by the testbench.
// Combinational: each result is sampled 1 ns after the operands change.
module tb_vedic_mul_16x16;
  localparam int NCORNER = 10;
  logic [15:0] a, b;
  logic [31:0] p;
  logic [15:0] corner [NCORNER] = '{16'h0000, 16'h0001, 16'hFFFF, 16'h8000,
                                    16'h00FF, 16'hFF00, 16'h0100, 16'h7FFF,
                                    16'h5555, 16'hAAAA};
  int checks = 0, failures = 0;

  vedic_mul_16x16 dut (.a(a), .b(b), .p(p));

  task automatic check(input logic [15:0] x, input logic [15:0] y);
    logic [31:0] expected;
    a = x;
    b = y;
    #1;
    expected = 32'(x) * 32'(y);
    checks++;
    if (p !== expected) begin
      failures++;
      if (failures < 10) $display("FAIL %h * %h = %h, expected %h", x, y, p, expected);
    end
  endtask

  initial begin : watchdog
    #(64'd10_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < NCORNER; i++)
      for (int j = 0; j < NCORNER; j++)
        check(corner[i], corner[j]);
    for (int k = 0; k < 200_000; k++)
      check(16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
