// End-to-end testbench for vedic_mac, the 16-bit Vedic multiply-accumulate
// unit, at its default sizes. It runs a series of inner products (as a FIR
// filter or a correlation would) of random length over random 16-bit vectors,
// with idle cycles (enable low) scattered inside them, and checks each cycle:
//   - `prod` equals a*b in the same cycle (combinational multiplier),
//   - `acc` equals the running sum exactly one clock after each accepted pair,
//   - `overflow` is set once the exact sum has passed 2^32.
// Runs of all-ones operands drive the sum past 32 bits, a clear with enable
// low zeroes the sum, and an asynchronous reset is applied mid-run. Each of
// these mechanisms is counted and a failure is counted for any that never
// happened.
module tb_vedic_mac;
  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        clear = 1'b0, en = 1'b0;
  logic [15:0] a = '0, b = '0;
  logic [31:0] prod, acc;
  logic        overflow;

  longint unsigned ref_sum = 0;   // exact sum since the last clear (bounded)
  int checks = 0, failures = 0;
  int n_acc = 0, n_hold = 0, n_clear_load = 0, n_clear_zero = 0;
  int n_wrap = 0, n_reset = 0, n_dot = 0;

  vedic_mac dut (.clk(clk), .rst_n(rst_n), .clear(clear), .en(en), .a(a), .b(b),
                 .prod(prod), .acc(acc), .overflow(overflow));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic ref_ovf();
    return ref_sum >= (64'd1 << 32);
  endfunction

  task automatic compare(input string what);
    checks++;
    if (acc !== 32'(ref_sum) || overflow !== ref_ovf()) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s: acc=%h ovf=%b, expected %h ovf=%b", what, acc, overflow,
                 32'(ref_sum), ref_ovf());
    end
  endtask

  // One clock: drive the controls and operands, check the product before the
  // edge and the accumulator after it.
  task automatic step(input logic c, input logic e, input logic [15:0] x, input logic [15:0] y);
    logic [31:0] p;
    clear <= c;
    en    <= e;
    a     <= x;
    b     <= y;
    #1;
    p = 32'(x) * 32'(y);
    checks++;
    if (prod !== p) begin
      failures++;
      if (failures < 10) $display("FAIL prod: %h * %h = %h, expected %h", x, y, prod, p);
    end
    // nothing may change before the clock edge
    compare("before edge");
    @(posedge clk);
    #1;
    if (c) begin
      ref_sum = e ? 64'(p) : 0;
      if (e) n_clear_load++; else n_clear_zero++;
    end else if (e) begin
      if (64'(32'(ref_sum)) + 64'(p) >= (64'd1 << 32)) n_wrap++;
      ref_sum = ref_sum + 64'(p);
      if (ref_sum >= (64'd2 << 32)) ref_sum = ref_sum - (64'd1 << 32);
      n_acc++;
    end else begin
      n_hold++;
    end
    compare("after edge");
  endtask

  initial begin
    #12;
    compare("reset");
    n_reset++;
    rst_n = 1'b1;
    @(negedge clk);
    // inner products of random length
    for (int v = 0; v < 300; v++) begin
      int len;
      len = 1 + int'($urandom % 64);
      for (int i = 0; i < len; i++) begin
        logic [15:0] x, y;
        if ($urandom % 8 == 0) step(1'b0, 1'b0, 16'($urandom), 16'($urandom));
        x = 16'($urandom);
        y = 16'($urandom);
        step(i == 0, 1'b1, x, y);
      end
      n_dot++;
    end
    // large operands: the sum passes 2^32 after two products
    step(1'b1, 1'b1, 16'hFFFF, 16'hFFFF);
    for (int i = 0; i < 4; i++) step(1'b0, 1'b1, 16'hFFFF, 16'hFFFF);
    // clear with enable low zeroes the sum and the flag
    step(1'b1, 1'b0, 16'h1234, 16'h5678);
    step(1'b0, 1'b1, 16'd3, 16'd7);
    // asynchronous reset in the middle of a sum
    step(1'b0, 1'b1, 16'hABCD, 16'h0102);
    #2 rst_n = 1'b0;
    #1 ref_sum = 0;
    compare("async reset");
    n_reset++;
    @(negedge clk);
    rst_n = 1'b1;
    step(1'b0, 1'b1, 16'd100, 16'd200);

    $display("inner products=%0d accumulates=%0d holds=%0d clear+load=%0d clear-to-zero=%0d wraps=%0d resets=%0d",
             n_dot, n_acc, n_hold, n_clear_load, n_clear_zero, n_wrap, n_reset);
    if (n_acc == 0 || n_hold == 0 || n_clear_load == 0 || n_clear_zero == 0 ||
        n_wrap == 0 || n_reset < 2) begin
      failures++;
      $display("FAIL: a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
