// nand2: two-input static CMOS NAND cell, out = not (a and b).
//
// In the adder it forms the complemented generate signal, G_BAR = NAND(A, B),
// which drives the gates of the C-chain's pull-up PMOS and upper pull-down
// NMOS. Only the cell's name and its use are given for the original design;
// the function is the standard NAND2. Purely combinational, no clock.
module nand2 (
  input  logic a,
  input  logic b,
  output logic out
);
  always_comb out = ~(a & b);
endmodule : nand2
