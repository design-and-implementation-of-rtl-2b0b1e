// tb_and_gate: exhaustive check of the two-input AND cell.
// Applies all four input pairs and compares y with the truth table written
// out below, independent of the cell's expression.
module tb_and_gate;
  logic a, b, y;
  int checks = 0, failures = 0;
  // Expected y for {a,b} = 00, 01, 10, 11.
  localparam logic [3:0] TRUTH = 4'b1000;

  and_gate u_dut (.a(a), .b(b), .y(y));

  initial begin : watchdog
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      #1;
      checks++;
      if (y !== TRUTH[v]) begin
        failures++;
        $display("FAIL a=%b b=%b y=%b expected %b", a, b, y, TRUTH[v]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
