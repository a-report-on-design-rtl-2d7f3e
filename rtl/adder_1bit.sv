// adder_1bit: one bit slice of the static Manchester-carry adder.
//
// The slice holds the three parts of the adder's organisation for one bit:
//   pg_cell  - P = A xor B, G = A and B (delivered as P, P_BAR, G_BAR)
//   c_chain  - C_OUT = P ? C_IN : G, a transmission gate on propagate and
//              static pull networks on generate and kill
//   sum_cell - SUM_OUT = P xor C_IN
// so SUM_OUT = A xor B xor C_IN and C_OUT is the full-adder carry. Slices
// are abutted C_OUT to C_IN to form a wider adder; the carry then crosses one
// transmission gate per bit. The decomposition into these gates follows the
// original bit-slice schematic; grouping them into three sub-modules is this
// design's choice.
//
// Interface: a, b, c_in in; sum_out, c_out out. Purely combinational.
module adder_1bit (
  input  logic a,
  input  logic b,
  input  logic c_in,
  output logic sum_out,
  output logic c_out
);
  logic g_bar, p, p_bar;

  pg_cell u_pg (.a(a), .b(b), .g_bar(g_bar), .p(p), .p_bar(p_bar));

  c_chain u_cchain (
    .c_in(c_in), .g_bar(g_bar), .p(p), .p_bar(p_bar), .c_out(c_out)
  );

  sum_cell u_sum (.p(p), .p_bar(p_bar), .c_in(c_in), .sum_out(sum_out));
endmodule : adder_1bit
