// qca_cmp_pkg: sizes shared by the digit-serial magnitude comparator.
//
// The comparator splits two N-bit operands into N/DW digits of DW bits and
// checks them one after another from the most significant digit. The default
// word width is the largest of the three widths (4, 8 and 16 bits) the design
// was evaluated at; the 2-bit digit matches the two-bit greater-than equation
// used by the adder block. Both are parameters of every module and can be
// overridden; the only rule is that N is a multiple of DW.
package qca_cmp_pkg;
  localparam int unsigned DEFAULT_WIDTH = 16;  // operand width N
  localparam int unsigned DEFAULT_DIGIT = 2;   // digit width DW
endpackage
