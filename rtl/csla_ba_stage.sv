// csla_ba_stage: one N-bit stage of the binary-adder carry select adder.
//
// The stage adds a + b in a ripple adder with carry in 0 before its carry in
// is known. A binary adder then adds the incoming carry to that sum, and the
// output mux, steered by the same carry, picks the ripple adder's sum
// (cin = 0) or the binary adder's (cin = 1). The carry out is the OR of the
// ripple adder's carry and the binary adder's carry: the two are never both
// 1, so the OR replaces the carry mux of a regular carry select adder; an
// immediate assertion checks that rule in simulation.
//
// Interface: a, b (N bits), cin in; sum (N bits), cout out. Combinational.
// The critical path from cin runs through the binary adder and the OR gate;
// a + b settles in parallel with the lower stages.
// N defaults to 3 (bits 7:5 of the 8-bit adder). Structure follows the
// design's stage diagram.
module csla_ba_stage #(
  parameter int unsigned N = 3
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] sum,
  output logic         cout
);
  logic [N-1:0] rca_sum;
  logic         rca_cout;
  logic [N-1:0] ba_sum;
  logic         ba_cout;

  rca_cin0 #(.N(N)) u_rca (
    .a(a), .b(b), .sum(rca_sum), .cout(rca_cout)
  );

  binary_adder #(.N(N)) u_ba (
    .p(rca_sum), .cin(cin), .s(ba_sum), .cout(ba_cout)
  );

  csla_mux #(.N(N)) u_mux (
    .d0(rca_sum), .d1(ba_sum), .sel(cin), .y(sum)
  );

  assign cout = rca_cout | ba_cout;

  // The OR can stand in for a carry mux only because the ripple adder and
  // the binary adder never both produce a carry.
  always_comb begin
    assert (!(rca_cout && ba_cout))
      else $error("csla_ba_stage: ripple and binary adder carries both set");
  end
endmodule
