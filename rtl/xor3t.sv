// xor3t: gate-level model of the three-transistor XOR gate.
//
// The cell is a CMOS inverter whose supply is taken from input b, plus a
// PMOS pass transistor from a to the output. With b high the inverter works
// normally and y = ~a; with b low the inverter floats and the pass transistor
// copies a to y. Together that is y = a xor b. Only this logic function is
// modelled: threshold drop through the pass device and transistor sizes are
// analog properties outside RTL.
//
// Interface: a, b in; y out. Purely combinational, no clock.
// The two operating modes follow the cell's published description; writing
// them as a select on b is this model's choice.
module xor3t (
  input  logic a,
  input  logic b,
  output logic y
);
  always_comb begin
    if (b) y = ~a;   // inverter mode
    else   y = a;    // pass-transistor mode
  end
endmodule
