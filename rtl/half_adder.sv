// half_adder: one-bit half adder, sum = a xor b, carry = a and b.
//
// The XOR is a 3T XOR cell, as in the full adder. Half adders take the
// least significant position of each carry-in-0 ripple adder and every
// position of the binary adder.
//
// Interface: a, b in; sum, carry out. Purely combinational.
// Using the 3T XOR here follows the design's transistor budget; the AND for
// the carry is the simplest choice, as the cell's insides are not specified.
module half_adder (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic carry
);
  xor3t u_xor (.a(a), .b(b), .y(sum));
  assign carry = a & b;
endmodule
