// 2x2-bit Vedic multiplier (Urdhva Tiryakbhyam, "vertically and crosswise").
//
// Four 1-bit multipliers form the partial products. The vertical product of
// the two LSBs is bit 0 of the result. The two crosswise products are added by
// a half adder to give bit 1 and a carry. The vertical product of the two MSBs
// is added to that carry by a second half adder to give bits 2 and 3.
// Purely combinational; unsigned operands, 4-bit product.
module vedic_mul_2x2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] p
);
  logic a0b0, a1b0, a0b1, a1b1;
  logic c1;

  vedic_mul_1x1 u_v0 (.a(a[0]), .b(b[0]), .p(a0b0));  // vertical, LSBs
  vedic_mul_1x1 u_x0 (.a(a[1]), .b(b[0]), .p(a1b0));  // crosswise
  vedic_mul_1x1 u_x1 (.a(a[0]), .b(b[1]), .p(a0b1));  // crosswise
  vedic_mul_1x1 u_v1 (.a(a[1]), .b(b[1]), .p(a1b1));  // vertical, MSBs

  always_comb begin
    p[0] = a0b0;
    // half adder on the crosswise products
    p[1] = a1b0 ^ a0b1;
    c1   = a1b0 & a0b1;
    // half adder on the MSB product and the carry
    p[2] = a1b1 ^ c1;
    p[3] = a1b1 & c1;
  end
endmodule
