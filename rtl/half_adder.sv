// half_adder: adds two bits into a sum bit and a carry bit.
//
// The original cell is a 10-transistor hybrid-logic half adder whose Carry
// and Sum leave through output inverters. Its transistor network has no RTL
// equivalent, so this module gives the cell's logic function:
//   sum = a ^ b,  carry = a & b.
// Port names follow the cell's pins (A, B, Sum, Carry). Purely combinational.
module half_adder (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic carry
);
  always_comb begin
    sum   = a ^ b;
    carry = a & b;
  end
endmodule
