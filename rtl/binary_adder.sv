// binary_adder: N-bit binary adder that adds a one-bit carry to a word.
//
// It replaces the second (carry-in-1) ripple adder of a plain carry select
// adder. A chain of half adders adds cin, the carry out of the previous
// stage, to p, the sum of the carry-in-0 ripple adder: s = p + cin. The last
// half adder's carry is cout; it is 1 only when cin is 1 and p is all ones,
// and the stage ORs it with the ripple adder's own carry.
//
// Interface: p (N bits), cin in; s (N bits), cout out. Combinational; the
// carry ripples through N half adders.
// N defaults to 4, the width of the published example; the 8-bit adder uses
// N = 2 and N = 3. The half-adder chain follows the design; nothing else is
// added.
module binary_adder #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0] p,
  input  logic         cin,
  output logic [N-1:0] s,
  output logic         cout
);
  logic [N:0] c;
  assign c[0] = cin;

  for (genvar i = 0; i < N; i++) begin : g_ha
    half_adder u_ha (.a(p[i]), .b(c[i]), .sum(s[i]), .carry(c[i+1]));
  end

  assign cout = c[N];
endmodule
