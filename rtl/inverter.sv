// inverter: static CMOS inverter cell, out = not in.
//
// The adder uses it in three places: to turn each single-rail input (A, B,
// carry in) into the true/complement pair that the mirror XNOR gates need,
// to turn P_BAR into P in the PG cell, and in pairs as a non-inverting
// buffer on the final carry out. Pins IN/OUT follow the cell symbol of the
// original schematic. Purely combinational, no clock.
module inverter (
  input  logic in,
  output logic out
);
  always_comb out = ~in;
endmodule : inverter
