// rca_cin0: N-bit ripple-carry adder with its carry input fixed at 0.
//
// Because the carry in is 0, bit 0 needs only a half adder; bits 1..N-1 are
// 8T full adders chained through their carries. sum/cout are a + b.
// In the carry-select stage this adder precomputes the slice sum assuming no
// carry arrives from below.
//
// Interface: a, b (N bits) in; sum (N bits), cout out. Combinational; the
// carry ripples through N cells.
// Parameter N defaults to 3, the widest slice of the 8-bit adder (bits 7:5);
// the other slices use N = 2. The half adder in the LSB follows the design's
// area count.
module rca_cin0 #(
  parameter int unsigned N = 3
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] sum,
  output logic         cout
);
  logic [N:0] c;

  half_adder u_ha0 (.a(a[0]), .b(b[0]), .sum(sum[0]), .carry(c[1]));
  assign c[0] = 1'b0;

  for (genvar i = 1; i < N; i++) begin : g_fa
    fa8t u_fa (.a(a[i]), .b(b[i]), .c(c[i]), .sum(sum[i]), .carry(c[i+1]));
  end

  assign cout = c[N];
endmodule
