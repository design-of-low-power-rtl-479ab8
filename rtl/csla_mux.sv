// csla_mux: 2N-to-N multiplexer of a carry-select stage.
//
// N independent 2:1 multiplexers, all steered by the carry arriving from the
// previous stage: sel = 0 chooses d0, the carry-in-0 ripple adder sum; sel = 1
// chooses d1, the binary adder sum. Each 2:1 mux is written in AND-OR form,
// (d0 & ~sel) | (d1 & sel), matching the gate count the design uses.
//
// Interface: d0, d1 (N bits), sel in; y (N bits) out. Combinational.
// N defaults to 3 (the 6:3 mux of the top stage). Which input sel = 0 picks
// is this design's convention.
module csla_mux #(
  parameter int unsigned N = 3
) (
  input  logic [N-1:0] d0,
  input  logic [N-1:0] d1,
  input  logic         sel,
  output logic [N-1:0] y
);
  assign y = (d0 & {N{~sel}}) | (d1 & {N{sel}});
endmodule
