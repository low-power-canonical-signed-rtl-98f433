// csd_mult_pkg: constants shared by the CSD / SPST multiplier.
//
// The multiplier takes two 16-bit operands and produces a 32-bit product.
// The 16-bit multiplier operand is recoded into 17 canonical signed digits
// (CSD), each kept as a sign bit and a magnitude bit: 0 is "00", +1 is
// "01" and -1 is "11" ({sign, magnitude}).  Because two adjacent CSD digits are never both
// non-zero, at most 9 of the 17 digits are non-zero, which fixes the number of
// partial-product slots.  Eight of them are added pairwise by the SPST
// adders.
package csd_mult_pkg;

  localparam int unsigned OP_W  = 16;              // operand width
  localparam int unsigned NSEL  = (OP_W + 2) / 2;  // max non-zero CSD digits of OP_W+1 (9)
  localparam int unsigned NSPST = 4;               // SPST adders in the tree

endpackage
