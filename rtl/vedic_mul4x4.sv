// vedic_mul4x4: 4-bit by 4-bit unsigned Vedic multiplier (top level).
//
// The multiplier B is split into a low pair B1 B0 and a high pair B3 B2. Two
// 4x2 Vedic multipliers form lo = A * B[1:0] and hi = A * B[3:2], each 6 bits.
// The product is lo + (hi << 2): bits O1 O0 are lo's two lowest bits
// unchanged, and a ripple row of one half adder, three full adders and one
// half adder adds the overlapping bits into O2..O6. The top bit O7 is the OR
// of hi's top bit and the row's last carry; they can never both be 1 because
// the product is at most 15*15 = 225, so the OR gives the same bit an adder
// would with fewer transistors.
//
//   O0 = lo.Y0                    O4 = FA(lo.Y4, hi.Y2, c3)
//   O1 = lo.Y1                    O5 = FA(lo.Y5, hi.Y3, c4)
//   O2 = HA(lo.Y2, hi.Y0)         O6 = HA(hi.Y4, c5)
//   O3 = FA(lo.Y3, hi.Y1, c2)     O7 = hi.Y5 | c6
//
// The split of B, the two 4x2 blocks, the HA/FA/FA/FA/HA row and the OR gate
// for O7 are the original design's; the exact bit-to-adder wiring is derived
// here from the shifted sum, since that is the only wiring that yields the
// product.
//
// Interface: a = A3..A0, b = B3..B0, o = O7..O0 = a * b.
// Timing: purely combinational, no clock or reset; a new product follows
// every change of a or b after the propagation delay through the 4x2 carry
// chain and the five-cell ripple row.
module vedic_mul4x4
  import vedic_pkg::*;
(
  input  operand_t a,
  input  operand_t b,
  output product_t o
);
  partial_t lo, hi;   // A * B[1:0] and A * B[3:2]
  logic [6:2] c;      // carry out of the cell producing O2..O6

  vedic_mul4x2 u_mul_lo (.a(a), .b(b[1:0]), .y(lo));
  vedic_mul4x2 u_mul_hi (.a(a), .b(b[3:2]), .y(hi));

  assign o[0] = lo[0];
  assign o[1] = lo[1];

  half_adder u_ha2 (.a(lo[2]), .b(hi[0]),               .sum(o[2]), .carry(c[2]));
  full_adder u_fa3 (.a(lo[3]), .b(hi[1]), .cin(c[2]),   .sum(o[3]), .cout(c[3]));
  full_adder u_fa4 (.a(lo[4]), .b(hi[2]), .cin(c[3]),   .sum(o[4]), .cout(c[4]));
  full_adder u_fa5 (.a(lo[5]), .b(hi[3]), .cin(c[4]),   .sum(o[5]), .cout(c[5]));
  half_adder u_ha6 (.a(hi[4]), .b(c[5]),                .sum(o[6]), .carry(c[6]));
  or_gate    u_or7 (.a(hi[5]), .b(c[6]),                .y(o[7]));

  // hi[5] and the last carry are exclusive, which is what lets an OR stand
  // in for the top adder. Deferred so that delta-cycle glitches on the
  // ripple path do not trip it.
  always_comb
    assert final (!(hi[5] && c[6]) || $isunknown({hi[5], c[6]}))
      else $error("vedic_mul4x4: O7 OR inputs both high (a=%0d b=%0d)", a, b);
endmodule
