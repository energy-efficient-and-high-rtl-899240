// roba_pkg -- constants shared by the rounding-based approximate (RoBA)
// multiplier modules.
//
// ROBA_N is the default operand width of every module. The description of
// the multiplier leaves the width open; 8 bits is this design's choice. It
// matches an implementation with 8 + 8 operand pins and a 16-bit product.
// Every module takes the width as a parameter, so other widths only need a
// different parameter value. Product-width modules default to 2 * ROBA_N.
package roba_pkg;

  // Default operand width in bits (two's complement for the signed top).
  parameter int unsigned ROBA_N = 8;

endpackage : roba_pkg
