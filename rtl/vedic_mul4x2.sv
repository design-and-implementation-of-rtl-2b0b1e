// vedic_mul4x2: 4-bit by 2-bit unsigned multiplier, "vertically and crosswise".
//
// Urdhva-Tiryagbhyam multiplication forms every output column from the bit
// products whose indices add up to that column, plus the carry from the column
// before. With a 2-bit multiplier the upper two bits of a 4-bit one are
// always zero, so their crosswise products vanish and only eight AND products
// remain:
//   Y0 = A0.B0
//   Y1 = A1.B0 + A0.B1              half adder, carry C0
//   Y2 = A2.B0 + A1.B1 + C0         full adder, carry C1
//   Y3 = A3.B0 + A2.B1 + C1         full adder, carry C2
//   Y4 = A3.B1 + C2                 half adder, carry C3
//   Y5 = C3
// The equations, the eight AND cells and the half/full/full/half adder chain
// are the original design's; the packed partial-product array is this
// design's way of writing them.
//
// Interface: a = A3..A0, b = B1 B0, y = Y5..Y0 = a * b (at most 45).
// Timing: purely combinational; the longest path runs through the carry
// chain of all four adders.
module vedic_mul4x2
  import vedic_pkg::*;
(
  input  operand_t a,
  input  half_t    b,
  output partial_t y
);
  // pp[j][i] = A[i] & B[j]: one AND cell per bit product.
  logic [HALF_W-1:0][OPERAND_W-1:0] pp;
  logic [3:0] c;   // C0..C3

  for (genvar j = 0; j < HALF_W; j++) begin : g_row
    for (genvar i = 0; i < OPERAND_W; i++) begin : g_col
      and_gate u_and (.a(a[i]), .b(b[j]), .y(pp[j][i]));
    end
  end

  // Column 0: a single product, no adder.
  assign y[0] = pp[0][0];

  // Columns 1..4: the crosswise sums with the carry rippled from the right.
  half_adder u_ha1 (.a(pp[0][1]), .b(pp[1][0]),                .sum(y[1]), .carry(c[0]));
  full_adder u_fa2 (.a(pp[0][2]), .b(pp[1][1]), .cin(c[0]),    .sum(y[2]), .cout(c[1]));
  full_adder u_fa3 (.a(pp[0][3]), .b(pp[1][2]), .cin(c[1]),    .sum(y[3]), .cout(c[2]));
  half_adder u_ha4 (.a(pp[1][3]), .b(c[2]),                    .sum(y[4]), .carry(c[3]));

  // Column 5: the final carry.
  assign y[5] = c[3];
endmodule
