// xnor2_mirror: two-input XNOR built as a CMOS mirror circuit, with
// dual-rail inputs.
//
// In a mirror gate the pull-up and pull-down networks have the same
// series-parallel shape. Here each network is two parallel branches of two
// series transistors:
//   pull-up   (PMOS, conducts on low gates):  A & B branch, A_BAR & B_BAR branch
//   pull-down (NMOS, conducts on high gates): A & B_BAR branch, B & A_BAR branch
// So OUT is pulled high when A == B and low when A != B: OUT = XNOR(A, B).
// The transistor arrangement (M28..M35) is the one of the original
// schematic; representing each network by its boolean conduction condition
// is this model's choice.
//
// The complement pins must be the true complements of A and B. If they are
// not, both networks can conduct (contention) or neither (floating output);
// an immediate assertion reports either case. The output then follows the
// pull-up network.
//
// Interface: a, a_bar, b, b_bar in; out. Purely combinational, no clock.
module xnor2_mirror (
  input  logic a,
  input  logic a_bar,
  input  logic b,
  input  logic b_bar,
  output logic out
);
  logic pull_up;    // a PMOS branch conducts: OUT tied to VDD
  logic pull_down;  // an NMOS branch conducts: OUT tied to VSS

  always_comb begin
    pull_up   = (~a & ~b) | (~a_bar & ~b_bar);
    pull_down = (a & b_bar) | (b & a_bar);
    out       = pull_up;
  end

  // Exactly one network conducts whenever the rails are complementary.
  always_comb begin
    if ((a != a_bar) && (b != b_bar))
      assert (pull_up != pull_down)
        else $error("xnor2_mirror: pull-up and pull-down both %b", pull_up);
  end
endmodule : xnor2_mirror
