// and_gate: two-input AND cell.
//
// In the 4x2 multiplier each of the eight partial-product bits A[i]&B[j] is
// one of these cells. The original cell is a static CMOS AND gate; here it is
// described by its logic function only. Purely combinational: y = a & b with
// no clock, no state.
module and_gate (
  input  logic a,
  input  logic b,
  output logic y
);
  always_comb y = a & b;
endmodule
