// sum_cell: the SUM block of one adder bit, S = P xor C_IN.
//
// The carry into the bit passes through an inverter (giving its complement)
// and a second inverter (giving a buffered true value). A mirror XNOR gate
// then compares P with the complemented carry:
//   S = XNOR(P, not C_IN) = P xor C_IN
// using P/P_BAR from the PG cell as its first dual-rail input and the carry
// pair, swapped, as its second. The gates follow the original bit-slice
// schematic; which inverter output feeds which XNOR pin is this design's
// choice, made to give the exclusive-or that an adder's sum requires.
//
// Interface: p, p_bar, c_in in; sum_out out. Purely combinational, no clock.
module sum_cell (
  input  logic p,
  input  logic p_bar,
  input  logic c_in,
  output logic sum_out
);
  logic c_n;    // complement of the incoming carry
  logic c_buf;  // buffered incoming carry

  inverter u_inv_c0 (.in(c_in), .out(c_n));
  inverter u_inv_c1 (.in(c_n),  .out(c_buf));

  xnor2_mirror u_xnor_s (
    .a(p), .a_bar(p_bar), .b(c_n), .b_bar(c_buf), .out(sum_out)
  );
endmodule : sum_cell
