// eightbitCSLABA: 8-bit square-root carry select adder with binary adders
// and 3T-XOR based 8T full adders.
//
// A carry select adder hides carry propagation by adding each slice before
// the carry from below is known and choosing the result once it arrives.
// Here the slices grow in width towards the top (square-root grouping):
//   stage 1  bit  0    : one 8T full adder with the external cin   -> C0
//   stage 2  bits 2:1  : carry-select stage, selected by C0        -> C2
//   stage 3  bits 4:3  : carry-select stage, selected by C2        -> C4
//   stage 4  bits 7:5  : carry-select stage, selected by C4        -> C7 = co
// Instead of a second ripple adder with carry in 1 (regular CSLA) or a
// binary-to-excess-1 converter, each stage uses a half-adder "binary adder"
// that adds the incoming carry to the carry-in-0 sum, and an OR gate to form
// the carry out. All XORs are 3T XOR cells.
//
// Interface: a, b (8 bits), cin in; sum (8 bits), co out, so
// {co, sum} = a + b + cin. Purely combinational: no clock or reset.
// The stage widths and carry names follow the published architecture; the
// module and port names are those of its RTL block diagram. The 3-bit
// internal carry vector c = {C4, C2, C0} is kept for inspection in simulation.
module eightbitCSLABA (
  input  logic [7:0] a,
  input  logic [7:0] b,
  input  logic       cin,
  output logic [7:0] sum,
  output logic       co
);
  logic [2:0] c;   // {C4, C2, C0}

  // Stage 1: 1-bit RCA
  fa8t u_stage1 (
    .a(a[0]), .b(b[0]), .c(cin), .sum(sum[0]), .carry(c[0])
  );

  // Stage 2: bits 2:1
  csla_ba_stage #(.N(2)) u_stage2 (
    .a(a[2:1]), .b(b[2:1]), .cin(c[0]), .sum(sum[2:1]), .cout(c[1])
  );

  // Stage 3: bits 4:3
  csla_ba_stage #(.N(2)) u_stage3 (
    .a(a[4:3]), .b(b[4:3]), .cin(c[1]), .sum(sum[4:3]), .cout(c[2])
  );

  // Stage 4: bits 7:5
  csla_ba_stage #(.N(3)) u_stage4 (
    .a(a[7:5]), .b(b[7:5]), .cin(c[2]), .sum(sum[7:5]), .cout(co)
  );
endmodule
