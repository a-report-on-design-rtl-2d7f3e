// c_chain: one stage of a static Manchester carry chain.
//
// Three switch networks drive the C_OUT node:
//   * a transmission gate between C_IN and C_OUT, on when P = 1 (nMOS gate
//     P, pMOS gate P_BAR): the carry is propagated, C_OUT = C_IN;
//   * PMOS M2 from VDD, gate G_BAR: on when G = 1, the carry is generated;
//   * NMOS M3 (gate G_BAR) in series with NMOS M4 (gate P_BAR) to VSS: on when
//     G = 0 and P = 0, the carry is killed.
// Hence C_OUT = P ? C_IN : G. The stage is static: the node is always driven,
// with no precharge or clock, and the chain runs from VDD to VSS rather than
// being precharged as in the dynamic textbook Manchester chain. Both the
// transistor arrangement and this behaviour follow the original design;
// modelling each network by its conduction condition is this model's choice.
//
// P and G come from the same bit's PG cell, so P = 1 implies G = 0 and
// exactly one network conducts. An immediate assertion reports contention
// (two networks on) or a floating node (none on), which only inconsistent
// P/G inputs can cause.
//
// Interface: c_in, g_bar, p, p_bar in; c_out. Purely combinational, no clock;
// in a chain the carry ripples through one transmission gate per bit.
module c_chain (
  input  logic c_in,
  input  logic g_bar,
  input  logic p,
  input  logic p_bar,
  output logic c_out
);
  logic tg_on;      // transmission gate conducts
  logic pull_up;    // M2 conducts
  logic pull_down;  // M3 and M4 both conduct

  always_comb begin
    tg_on     = p & ~p_bar;
    pull_up   = ~g_bar;
    pull_down = g_bar & p_bar;
    if (tg_on)        c_out = c_in;
    else if (pull_up) c_out = 1'b1;
    else              c_out = 1'b0;
  end

  always_comb begin
    if (p != p_bar)
      assert ((32'(tg_on) + 32'(pull_up) + 32'(pull_down)) == 1)
        else $error("c_chain: %0d networks drive C_OUT (tg=%b up=%b down=%b)",
                    32'(tg_on) + 32'(pull_up) + 32'(pull_down), tg_on, pull_up, pull_down);
  end
endmodule : c_chain
