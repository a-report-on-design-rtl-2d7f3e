// pg_cell: the PG (propagate/generate) block of one adder bit.
//
//   G_BAR = NAND(A, B)        generate, complemented: G = A and B
//   P_BAR = XNOR(A, B)        mirror XNOR gate
//   P     = not P_BAR         propagate: P = A xor B
//
// Each of A and B passes through an inverter to give its complement and
// through a second inverter to give a buffered true value, so that the mirror
// XNOR receives a true/complement pair for both operands. These are the gates
// and signal names of the original bit-slice schematic; the exact pin-to-pin
// wiring of the XNOR inputs is this design's choice, made so that the gate
// yields P_BAR. The C-chain needs all three outputs: G_BAR and P_BAR drive
// its pull networks, P and P_BAR its transmission gate.
//
// Interface: a, b in; g_bar, p, p_bar out. Purely combinational, no clock.
module pg_cell (
  input  logic a,
  input  logic b,
  output logic g_bar,
  output logic p,
  output logic p_bar
);
  logic a_n, a_buf;  // complement and buffered true value of A
  logic b_n, b_buf;  // complement and buffered true value of B

  inverter u_inv_a0 (.in(a),   .out(a_n));
  inverter u_inv_a1 (.in(a_n), .out(a_buf));
  inverter u_inv_b0 (.in(b),   .out(b_n));
  inverter u_inv_b1 (.in(b_n), .out(b_buf));

  nand2 u_nand_g (.a(a_buf), .b(b_buf), .out(g_bar));

  xnor2_mirror u_xnor_p (
    .a(a_buf), .a_bar(a_n), .b(b_buf), .b_bar(b_n), .out(p_bar)
  );

  inverter u_inv_p (.in(p_bar), .out(p));
endmodule : pg_cell
