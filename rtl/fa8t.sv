// fa8t: eight-transistor full adder built from two 3T XOR gates.
//
// The first XOR forms the intermediate node out1 = a xor b, the second forms
// sum = out1 xor c. The remaining two transistors are a pass network that
// passes c to the carry output when out1 is 1 (the carry propagates) and a
// when out1 is 0 (a == b, so the carry is generated or killed by a). This
// equals the majority function carry = ab + bc + ca.
//
// Interface: a, b, c in; sum, carry out. Purely combinational.
// The XOR structure follows the published cell; expressing the carry pass
// network as a 2:1 select is this model's reading of it.
module fa8t (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic sum,
  output logic carry
);
  logic out1;

  xor3t u_xor1 (.a(a),    .b(b), .y(out1));
  xor3t u_xor2 (.a(out1), .b(c), .y(sum));

  assign carry = out1 ? c : a;
endmodule
