// Self-checking testbench for mac_accumulator (32-bit). Drives random addends
// with random enable and clear, plus runs of large addends that force the sum
// to wrap, and compares the register and the sticky overflow flag after each
// clock with a reference sum kept in 64 bits by the testbench. Also checks
// the asynchronous reset and that each sum appears exactly one clock after
// its addend is accepted.
module tb_mac_accumulator;
  localparam int W = 32;
  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic         clear = 1'b0, en = 1'b0;
  logic [W-1:0] addend = '0;
  logic [W-1:0] acc;
  logic         overflow;
  longint unsigned ref_sum = 0;   // exact sum since the last clear
  int checks = 0, failures = 0;
  int n_wrap = 0, n_clear = 0, n_hold = 0;

  mac_accumulator dut (.clk(clk), .rst_n(rst_n), .clear(clear), .en(en),
                       .addend(addend), .acc(acc), .overflow(overflow));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(input string what);
    checks++;
    if (acc !== W'(ref_sum) || overflow !== (ref_sum >= (64'd1 << W))) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s: acc=%h ovf=%b, expected %h ovf=%b", what, acc, overflow,
                 W'(ref_sum), ref_sum >= (64'd1 << W));
    end
  endtask

  // One clock with the given controls; the reference is updated alongside.
  task automatic step(input logic c, input logic e, input logic [W-1:0] v);
    clear  <= c;
    en     <= e;
    addend <= v;
    @(posedge clk);
    #1;
    if (c) begin
      ref_sum = e ? 64'(v) : 0;
      n_clear++;
    end else if (e) begin
      if (64'(W'(ref_sum)) + 64'(v) >= (64'd1 << W)) n_wrap++;
      // keep the sum bounded while remembering that it passed 2^W
      ref_sum = ref_sum + 64'(v);
      if (ref_sum >= (64'd2 << W)) ref_sum = ref_sum - (64'd1 << W);
    end else begin
      n_hold++;
    end
    compare("step");
  endtask

  initial begin
    #12;
    compare("reset");
    rst_n = 1'b1;
    @(negedge clk);
    // latency: the first addend shows after exactly one clock edge
    en <= 1'b1;
    addend <= 32'd1234;
    @(posedge clk);
    #1;
    checks++;
    if (acc !== 32'd1234) begin
      failures++;
      $display("FAIL latency: acc=%0d after one clock", acc);
    end
    ref_sum = 1234;
    for (int k = 0; k < 5000; k++) begin
      logic c, e;
      logic [W-1:0] v;
      c = ($urandom % 50) == 0;
      e = ($urandom % 4) != 0;
      v = (((k / 500) % 2) != 0) ? W'($urandom) : W'($urandom % 65536);
      step(c, e, v);
    end
    // force a wrap-around from a known state
    step(1'b1, 1'b1, 32'hFFFF_FFF0);
    step(1'b0, 1'b1, 32'h0000_0020);
    // asynchronous reset mid-run
    step(1'b0, 1'b1, 32'h1234_5678);
    #2 rst_n = 1'b0;
    #1 ref_sum = 0;
    compare("async reset");
    rst_n = 1'b1;
    if (n_wrap == 0 || n_clear == 0 || n_hold == 0) begin
      failures++;
      $display("FAIL coverage: wraps=%0d clears=%0d holds=%0d", n_wrap, n_clear, n_hold);
    end
    $display("wraps=%0d clears=%0d holds=%0d", n_wrap, n_clear, n_hold);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
