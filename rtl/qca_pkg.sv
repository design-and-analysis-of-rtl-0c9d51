// qca_pkg: sizes shared by the quantum-dot cellular automata (QCA) adders and multiplier.
//
// The published layouts are given for 4-bit operands and are scaled to 8 and 16 bits, so
// 4 is the default operand width of every adder and of the serial-parallel multiplier.
// CLA_GROUP (the lookahead group size) is a choice of this RTL.
package qca_pkg;
  parameter int unsigned ADD_WIDTH = 4;  // adder operand width (4-bit layout)
  parameter int unsigned MUL_WIDTH = 4;  // multiplier operand width N
  parameter int unsigned CLA_GROUP = 4;  // carry lookahead group size
endpackage
