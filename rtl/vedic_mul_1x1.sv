// 1-bit Vedic multiplier: the leaf of the multiplier hierarchy.
//
// Multiplying two single bits is their logical AND. Every vertical and
// crosswise product of the 2x2 Urdhva Tiryakbhyam multiplier is one of these.
// Purely combinational.
module vedic_mul_1x1 (
  input  logic a,
  input  logic b,
  output logic p
);
  assign p = a & b;
endmodule
