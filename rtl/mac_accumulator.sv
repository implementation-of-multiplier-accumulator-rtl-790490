// Adder and accumulator register of the MAC unit.
//
// On each enabled clock edge the incoming product is added to the running sum
// and the result is written back, so the register always holds the sum of the
// products accepted since the last clear. The sum is kept to ACC_W bits and
// wraps on overflow; a sticky flag records that a carry was lost.
//
// Interface: `en` accepts `addend` on the rising clock edge. `clear` starts a
// new sum: with `en` high the register is loaded with `addend` (the first term
// of the new sum), with `en` low it is set to zero; either way the overflow
// flag is reset. `rst_n` is an asynchronous active-low reset to zero.
// Timing: `acc` shows the new sum one clock after the addend is accepted.
// The clear, enable, wrap-around and overflow flag are this design's choices;
// the source only gives the adder-plus-accumulator structure.
module mac_accumulator #(
  parameter int unsigned ACC_W = mac_pkg::ACC_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             en,
  input  logic [ACC_W-1:0] addend,
  output logic [ACC_W-1:0] acc,
  output logic             overflow
);
  logic [ACC_W:0] sum;   // adder output with carry

  always_comb sum = {1'b0, acc} + {1'b0, addend};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc      <= '0;
      overflow <= 1'b0;
    end else if (clear) begin
      acc      <= en ? addend : '0;
      overflow <= 1'b0;
    end else if (en) begin
      acc      <= sum[ACC_W-1:0];
      overflow <= overflow | sum[ACC_W];
    end
  end
endmodule
