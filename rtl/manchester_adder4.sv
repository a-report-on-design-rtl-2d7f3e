// manchester_adder4: 4-bit static Manchester-carry adder.
//
// Computes {c_out, sum} = a + b + c_in. The adder is WIDTH identical bit
// slices (adder_1bit) chained carry out to carry in: slice 0 takes the
// external carry, slice i takes the carry C(i-1) of slice i-1. Inside each
// slice the carry is either generated (A = B = 1), killed (A = B = 0), or
// passed through a transmission gate (A != B). The longest path is therefore
// c_in to c_out with every bit propagating (for example a = 0000,
// b = 1111), where the carry crosses all WIDTH transmission gates and also
// sets sum[WIDTH-1]. The last slice's carry is buffered by two inverters in
// series before leaving the block, which restores drive strength after the
// pass-gate chain without changing its polarity.
//
// The slice structure, the carry buffer and WIDTH = 4 follow the original
// design. Making WIDTH a parameter is this design's addition. The model is
// zero-delay: the original gives analog figures for its layout (about
// 1.1 ns average c_in to c_out delay in a 0.6 um process) that RTL does not
// represent.
//
// Interface: a, b (WIDTH bits), c_in in; sum (WIDTH bits), c_out out.
// Purely combinational: no clock, no reset, no latency in cycles.
module manchester_adder4 #(
  parameter int unsigned WIDTH = manchester_pkg::ADDER_WIDTH
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             c_in,
  output logic [WIDTH-1:0] sum,
  output logic             c_out
);
  // carry[i] enters slice i; carry[WIDTH] leaves the last slice.
  logic [WIDTH:0] carry;
  logic           c_out_n;

  assign carry[0] = c_in;

  for (genvar i = 0; i < WIDTH; i++) begin : g_slice
    adder_1bit u_bit (
      .a(a[i]), .b(b[i]), .c_in(carry[i]),
      .sum_out(sum[i]), .c_out(carry[i+1])
    );
  end

  // Two-inverter carry-out buffer.
  inverter u_cout_inv0 (.in(carry[WIDTH]), .out(c_out_n));
  inverter u_cout_inv1 (.in(c_out_n),      .out(c_out));
endmodule : manchester_adder4
