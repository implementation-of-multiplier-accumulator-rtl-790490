// Addition tree of an NxN Vedic multiplier built from four (N/2)x(N/2) ones.
//
// With H = HALF = N/2, the operands split as a = {aH, aL}, b = {bH, bL} and
// the four partial products are q0 = aL*bL, q1 = aH*bL, q2 = aL*bH and
// q3 = aH*bH, each 2H bits wide. The product is
//   p = q0 + (q1 + q2) << H + q3 << 2H.
// The low H bits of q0 pass straight to the result. The two crosswise
// products and the upper half of q0 are summed into a (2H+1)-bit middle term,
// whose low H bits are the next slice of the result; its upper H+1 bits are
// added to q3 to give the upper 2H bits. Purely combinational.
module vedic_add_tree #(
  parameter int unsigned HALF = 8   // width of one operand half (N/2)
) (
  input  logic [2*HALF-1:0] q0,     // aL * bL
  input  logic [2*HALF-1:0] q1,     // aH * bL
  input  logic [2*HALF-1:0] q2,     // aL * bH
  input  logic [2*HALF-1:0] q3,     // aH * bH
  output logic [4*HALF-1:0] p
);
  logic [2*HALF:0]   xsum;   // q1 + q2
  logic [2*HALF:0]   mid;     // xsum + upper half of q0
  logic [2*HALF-1:0] upper;   // q3 + upper part of mid

  always_comb begin
    xsum = {1'b0, q1} + {1'b0, q2};
    mid  = xsum + {{(HALF+1){1'b0}}, q0[2*HALF-1:HALF]};
    // The full product fits in 4*HALF bits, so this sum cannot carry out.
    upper = q3 + {{(HALF-1){1'b0}}, mid[2*HALF:HALF]};
    p     = {upper, mid[HALF-1:0], q0[HALF-1:0]};
  end
endmodule
