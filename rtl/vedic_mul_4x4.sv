// 4x4-bit Vedic multiplier (Urdhva Tiryakbhyam).
//
// Both operands are split into 2-bit halves. Four 2x2 Vedic
// multipliers form the vertical (aL*bL, aH*bH) and crosswise (aH*bL, aL*bH)
// partial products at the same time, and an addition tree combines them into
// the 8-bit product. Purely combinational; unsigned operands.
module vedic_mul_4x4 (
  input  logic [3:0]  a,
  input  logic [3:0]  b,
  output logic [7:0] p
);
  logic [3:0] q0, q1, q2, q3;

  vedic_mul_2x2 u_ll (.a(a[1:0]), .b(b[1:0]), .p(q0));  // aL * bL
  vedic_mul_2x2 u_hl (.a(a[3:2]), .b(b[1:0]), .p(q1));  // aH * bL
  vedic_mul_2x2 u_lh (.a(a[1:0]), .b(b[3:2]), .p(q2));  // aL * bH
  vedic_mul_2x2 u_hh (.a(a[3:2]), .b(b[3:2]), .p(q3));  // aH * bH

  vedic_add_tree #(.HALF(2)) u_tree (
    .q0(q0), .q1(q1), .q2(q2), .q3(q3), .p(p)
  );
endmodule
