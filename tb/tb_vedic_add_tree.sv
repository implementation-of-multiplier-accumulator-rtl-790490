// Self-checking testbench for vedic_add_tree with its default HALF = 8 (the
// tree of the 16x16 multiplier). The testbench forms the four partial
// products of random and extreme 16-bit operand pairs itself, feeds them to
// the tree and checks that the tree's output equals the full product a * b.
module tb_vedic_add_tree;
  localparam int H = 8;
  logic [2*H-1:0] q0, q1, q2, q3;
  logic [4*H-1:0] p;
  int checks = 0, failures = 0;

  vedic_add_tree dut (.q0(q0), .q1(q1), .q2(q2), .q3(q3), .p(p));

  task automatic check(input logic [2*H-1:0] x, input logic [2*H-1:0] y);
    logic [4*H-1:0] expected;
    q0 = (2*H)'(x[H-1:0])   * (2*H)'(y[H-1:0]);
    q1 = (2*H)'(x[2*H-1:H]) * (2*H)'(y[H-1:0]);
    q2 = (2*H)'(x[H-1:0])   * (2*H)'(y[2*H-1:H]);
    q3 = (2*H)'(x[2*H-1:H]) * (2*H)'(y[2*H-1:H]);
    #1;
    expected = (4*H)'(x) * (4*H)'(y);
    checks++;
    if (p !== expected) begin
      failures++;
      if (failures < 10) $display("FAIL %h * %h -> %h, expected %h", x, y, p, expected);
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
    check('0, '0);
    check('1, '1);
    check('1, 16'h0001);
    check(16'hFF00, 16'h00FF);
    check(16'h00FF, 16'hFFFF);
    for (int k = 0; k < 100_000; k++)
      check(16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
