// tb_full_adder: exhaustive check of the full adder.
// For all eight input combinations, {cout, sum} must equal the integer sum
// a + b + cin.
module tb_full_adder;
  logic a, b, cin, sum, cout;
  int checks = 0, failures = 0;

  full_adder u_dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin : watchdog
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      int expected;
      {a, b, cin} = 3'(v);
      expected = int'(a) + int'(b) + int'(cin);
      #1;
      checks++;
      if ({cout, sum} !== 2'(expected)) begin
        failures++;
        $display("FAIL a=%b b=%b cin=%b -> cout=%b sum=%b, expected %0d",
                 a, b, cin, cout, sum, expected);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
