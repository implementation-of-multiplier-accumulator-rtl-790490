// 16x16-bit Vedic multiplier (Urdhva Tiryakbhyam).
//
// Both operands are split into 8-bit halves. Four 8x8 Vedic
// multipliers form the vertical (aL*bL, aH*bH) and crosswise (aH*bL, aL*bH)
// partial products at the same time, and an addition tree combines them into
// the 32-bit product. Purely combinational; unsigned operands.
module vedic_mul_16x16 (
  input  logic [15:0]  a,
  input  logic [15:0]  b,
  output logic [31:0] p
);
  logic [15:0] q0, q1, q2, q3;

  vedic_mul_8x8 u_ll (.a(a[7:0]), .b(b[7:0]), .p(q0));  // aL * bL
  vedic_mul_8x8 u_hl (.a(a[15:8]), .b(b[7:0]), .p(q1));  // aH * bL
  vedic_mul_8x8 u_lh (.a(a[7:0]), .b(b[15:8]), .p(q2));  // aL * bH
  vedic_mul_8x8 u_hh (.a(a[15:8]), .b(b[15:8]), .p(q3));  // aH * bH

  vedic_add_tree #(.HALF(8)) u_tree (
    .q0(q0), .q1(q1), .q2(q2), .q3(q3), .p(p)
  );
endmodule
