// tb_vedic_mul4x2: exhaustive check of the 4x2 Vedic multiplier.
// All 16 x 4 operand pairs are applied; y must equal the integer product
// a * b. It also counts how often each adder carry C0..C3 of the column
// chain is set, and fails if any carry never occurs (the chain would be
// untested).
module tb_vedic_mul4x2
  import vedic_pkg::*;
;
  operand_t a;
  half_t    b;
  partial_t y;
  int checks = 0, failures = 0;
  int carry_seen [4] = '{default: 0};

  vedic_mul4x2 u_dut (.a(a), .b(b), .y(y));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int ia = 0; ia < 16; ia++) begin
      for (int ib = 0; ib < 4; ib++) begin
        int expected;
        a = operand_t'(ia);
        b = half_t'(ib);
        expected = ia * ib;
        #1;
        checks++;
        if (int'(y) != expected) begin
          failures++;
          $display("FAIL %0d * %0d = %0d, expected %0d", ia, ib, y, expected);
        end
        // Carries of each column worked out from the bit products, not
        // read from the block.
        begin
          int col1, col2, col3, col4;
          col1 = (ia & 1) * (ib >> 1) + ((ia >> 1) & 1) * (ib & 1);
          col2 = ((ia >> 2) & 1) * (ib & 1) + ((ia >> 1) & 1) * (ib >> 1) + col1 / 2;
          col3 = ((ia >> 3) & 1) * (ib & 1) + ((ia >> 2) & 1) * (ib >> 1) + col2 / 2;
          col4 = ((ia >> 3) & 1) * (ib >> 1) + col3 / 2;
          if (col1 >= 2) carry_seen[0]++;
          if (col2 >= 2) carry_seen[1]++;
          if (col3 >= 2) carry_seen[2]++;
          if (col4 >= 2) carry_seen[3]++;
        end
      end
    end
    for (int k = 0; k < 4; k++) begin
      $display("carry C%0d occurred %0d times", k, carry_seen[k]);
      checks++;
      if (carry_seen[k] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
