// vedic_pkg: operand and product types shared by the Vedic multiplier blocks.
//
// The multiplier multiplies two 4-bit unsigned numbers. It splits the
// multiplier operand B into two 2-bit halves, so the intermediate products are
// 4x2 products of 6 bits. The widths follow the 4x4 design; the type names are
// this design's own.
package vedic_pkg;
  localparam int unsigned OPERAND_W  = 4;                      // A3..A0, B3..B0
  localparam int unsigned HALF_W     = 2;                      // B1 B0 or B3 B2
  localparam int unsigned PARTIAL_W  = OPERAND_W + HALF_W;     // Y5..Y0 of a 4x2 block
  localparam int unsigned PRODUCT_W  = 2 * OPERAND_W;          // O7..O0

  typedef logic [OPERAND_W-1:0] operand_t;
  typedef logic [HALF_W-1:0]    half_t;
  typedef logic [PARTIAL_W-1:0] partial_t;
  typedef logic [PRODUCT_W-1:0] product_t;
endpackage
