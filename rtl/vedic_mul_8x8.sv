// 8x8-bit Vedic multiplier (Urdhva Tiryakbhyam).
//
// Both operands are split into 4-bit halves. Four 4x4 Vedic
// multipliers form the vertical (aL*bL, aH*bH) and crosswise (aH*bL, aL*bH)
// partial products at the same time, and an addition tree combines them into
// the 16-bit product. Purely combinational; unsigned operands.
module vedic_mul_8x8 (
  input  logic [7:0]  a,
  input  logic [7:0]  b,
  output logic [15:0] p
);
  logic [7:0] q0, q1, q2, q3;

  vedic_mul_4x4 u_ll (.a(a[3:0]), .b(b[3:0]), .p(q0));  // aL * bL
  vedic_mul_4x4 u_hl (.a(a[7:4]), .b(b[3:0]), .p(q1));  // aH * bL
  vedic_mul_4x4 u_lh (.a(a[3:0]), .b(b[7:4]), .p(q2));  // aL * bH
  vedic_mul_4x4 u_hh (.a(a[7:4]), .b(b[7:4]), .p(q3));  // aH * bH

  vedic_add_tree #(.HALF(4)) u_tree (
    .q0(q0), .q1(q1), .q2(q2), .q3(q3), .p(p)
  );
endmodule
