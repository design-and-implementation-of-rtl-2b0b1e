// or_gate: two-input OR cell.
//
// The 4x4 multiplier uses one of these to form the top product bit O7 from
// the top bit of the upper 4x2 partial product and the final carry of the
// adder row. The original cell is a static CMOS OR gate; here it is described
// by its logic function only. Purely combinational: y = a | b.
module or_gate (
  input  logic a,
  input  logic b,
  output logic y
);
  always_comb y = a | b;
endmodule
