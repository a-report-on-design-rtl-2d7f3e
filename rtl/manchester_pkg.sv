// manchester_pkg: constants shared by the Manchester-carry adder and its
// testbenches.
//
// ADDER_WIDTH is the operand width of the adder as designed: two 4-bit
// operands, a 4-bit sum and one carry out. The adder keeps it as the default
// of its WIDTH parameter.
package manchester_pkg;
  localparam int unsigned ADDER_WIDTH = 4;
endpackage : manchester_pkg
