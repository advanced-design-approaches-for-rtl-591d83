// Shared constants of the multiplier family.
//
// WORD_BITS is the operand width of every multiplier in the family (8 x 8
// bits, signed two's complement, 16-bit product).  DIGIT_SIZE is the digit
// width of the digit-serial variants (two bits per clock); the bit-serial
// variants use a digit width of one.  Both numbers are the ones the design is
// specified for; every module still takes them as parameters so other sizes
// can be elaborated.
package mult_pkg;
  parameter int unsigned WORD_BITS  = 8;
  parameter int unsigned DIGIT_SIZE = 2;
endpackage
