// tb_vedic_mul4x4: end-to-end check of the 4x4 Vedic multiplier.
// Applies all 256 operand pairs in order, then 256 random pairs with the
// operands changing together, and compares o with the integer product a * b.
// It counts how often each mechanism of the design is exercised and fails if
// one never is:
//   - a carry out of each cell of the O2..O6 adder row,
//   - O7 set through the top bit of the upper 4x2 product,
//   - O7 set through the final carry of the adder row.
// These are worked out from the operands, not read from the design.
// The multiplier has no parameters, so this is also the full-size test.
module tb_vedic_mul4x4
  import vedic_pkg::*;
;
  operand_t a, b;
  product_t o;
  int checks = 0, failures = 0;
  int row_carry [2:6] = '{default: 0};
  int o7_from_hi = 0, o7_from_carry = 0;

  vedic_mul4x4 u_dut (.a(a), .b(b), .o(o));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input int ia, input int ib);
    int expected, lo, hi, col, carry;
    a = operand_t'(ia);
    b = operand_t'(ib);
    expected = ia * ib;
    #1;
    checks++;
    if (int'(o) != expected) begin
      failures++;
      $display("FAIL %0d * %0d = %0d, expected %0d", ia, ib, o, expected);
    end
    // Reference model of the adder row: column k adds lo bit k, hi bit k-2
    // and the carry from column k-1.
    lo = ia * (ib & 3);
    hi = ia * (ib >> 2);
    carry = 0;
    for (int k = 2; k <= 6; k++) begin
      col = ((lo >> k) & 1) + ((hi >> (k - 2)) & 1) + carry;
      carry = col / 2;
      if (carry != 0) row_carry[k]++;
    end
    if (((hi >> 5) & 1) != 0) o7_from_hi++;
    if (carry != 0) o7_from_carry++;
  endtask

  initial begin
    for (int ia = 0; ia < 16; ia++)
      for (int ib = 0; ib < 16; ib++)
        apply(ia, ib);
    for (int n = 0; n < 256; n++)
      apply(int'($urandom_range(15)), int'($urandom_range(15)));

    for (int k = 2; k <= 6; k++) begin
      $display("carry out of the O%0d cell: %0d times", k, row_carry[k]);
      checks++;
      if (row_carry[k] == 0) failures++;
    end
    $display("O7 from upper partial product: %0d times", o7_from_hi);
    $display("O7 from adder-row carry:       %0d times", o7_from_carry);
    checks += 2;
    if (o7_from_hi == 0) failures++;
    if (o7_from_carry == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
