// Multiplier-accumulator (MAC) unit built on a 16x16-bit Vedic multiplier.
//
// The MAC computes the running sum of products acc = sum(a[i] * b[i]) that
// filters, convolutions, transforms and inner products are made of. The
// product of the two 16-bit unsigned operands comes from the combinational
// Urdhva Tiryakbhyam multiplier (vedic_mul_16x16); the 32-bit product feeds
// the adder of the accumulator, whose register holds the sum of the previous
// products and is the 32-bit final output.
//
// Interface: present `a` and `b` with `en` high to accumulate their product on
// the next rising edge of `clk`; `clear` starts a new sum (see
// mac_accumulator); `rst_n` resets asynchronously. `prod` is the current
// product, available in the same cycle. `overflow` is set once the sum has
// wrapped past 32 bits since the last clear.
// Timing: one operand pair per clock, `acc` updated one clock after the pair
// is presented. The multiplier structure follows the source; the control
// signals, the overflow flag and the single register stage are this design's
// own choices.
module vedic_mac
  import mac_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  logic              en,
  input  logic [OP_W-1:0]   a,
  input  logic [OP_W-1:0]   b,
  output logic [PROD_W-1:0] prod,
  output logic [ACC_W-1:0]  acc,
  output logic              overflow
);
  vedic_mul_16x16 u_mul (.a(a), .b(b), .p(prod));

  mac_accumulator #(.ACC_W(ACC_W)) u_acc (
    .clk     (clk),
    .rst_n   (rst_n),
    .clear   (clear),
    .en      (en),
    .addend  (ACC_W'(prod)),
    .acc     (acc),
    .overflow(overflow)
  );
endmodule
