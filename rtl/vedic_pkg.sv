// Shared widths and types of the 8x8 compressor-based Urdhwa Tiryakbhyam
// multiplier. The operand width of 8 bits (and hence the 16-bit product) is
// the size the multiplier is defined for; the column reduction in
// vedic_mult8 is laid out by hand for exactly this width.
package vedic_pkg;
  localparam int unsigned OPERAND_W = 8;
  localparam int unsigned PRODUCT_W = 2 * OPERAND_W;

  typedef logic [OPERAND_W-1:0] operand_t;
  typedef logic [PRODUCT_W-1:0] product_t;
endpackage
