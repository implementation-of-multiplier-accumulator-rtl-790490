// Shared widths of the Vedic multiply-accumulate unit.
//
// The operands are 16-bit unsigned numbers, the product is 32 bits wide and
// the accumulator keeps a 32-bit running sum, the "32-bit final output" of
// the MAC. These are the design's only global constants.
package mac_pkg;
  localparam int unsigned OP_W   = 16;        // multiplier / multiplicand width
  localparam int unsigned PROD_W = 2 * OP_W;  // full product width
  localparam int unsigned ACC_W  = 32;        // accumulator (final output) width
endpackage
