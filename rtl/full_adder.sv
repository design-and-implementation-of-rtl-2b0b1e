// full_adder: adds three bits into a sum bit and a carry bit.
//
// The original cell is a 20-transistor full adder built with inverters and
// pass networks. Its transistor network has no RTL equivalent, so this module
// gives the cell's logic function:
//   sum  = a ^ b ^ cin
//   cout = majority(a, b, cin)
// Port names follow the cell's pins (A, B, Cin, Sum, Carry). Purely
// combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);
  always_comb begin
    sum  = a ^ b ^ cin;
    cout = (a & b) | (a & cin) | (b & cin);
  end
endmodule
