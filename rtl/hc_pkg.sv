// Shared constants of the hybrid carry multiplier.
//
// The multiplier takes two 32-bit unsigned operands and produces a 64-bit
// product. The pipelined form splits the multiplier operand over eight
// stages, each holding a 64-bit partial-sum register (s1..s8); both numbers
// follow the published design. The four-bit carry-lookahead group size is
// this implementation's choice.
package hc_pkg;
  localparam int unsigned HC_WIDTH  = 32;  // operand width (a, b)
  localparam int unsigned HC_STAGES = 8;   // pipeline stages (s1..s8)
  localparam int unsigned CLA_GROUP = 4;   // bits per carry-lookahead group
endpackage
