// tb_half_adder: exhaustive check of the half adder.
// For every input pair, {carry, sum} must equal the integer sum a + b.
module tb_half_adder;
  logic a, b, sum, carry;
  int checks = 0, failures = 0;

  half_adder u_dut (.a(a), .b(b), .sum(sum), .carry(carry));

  initial begin : watchdog
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      int expected;
      {a, b} = 2'(v);
      expected = int'(a) + int'(b);
      #1;
      checks++;
      if ({carry, sum} !== 2'(expected)) begin
        failures++;
        $display("FAIL a=%b b=%b -> carry=%b sum=%b, expected %0d", a, b, carry, sum, expected);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
