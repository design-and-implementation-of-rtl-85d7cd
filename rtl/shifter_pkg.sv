// shifter_pkg: types shared by the shift/rotate unit and its users.
//
// shift_op_t is the 3-bit operation code of the shift/rotate unit, one flag
// per bit in the order {left, rotate, arithmetic}:
//   000 shift right logical      001 shift right arithmetic
//   01x rotate right             100 shift left logical
//   101 shift left arithmetic    11x rotate left
// The encoding follows the published operation table; the packed struct is
// this design's way of naming the three flags.
package shifter_pkg;

  typedef struct packed {
    logic left;    // 1: shift/rotate towards the MSB, 0: towards the LSB
    logic rotate;  // 1: bits leaving one end re-enter at the other
    logic arith;   // 1: arithmetic shift (ignored when rotate = 1)
  } shift_op_t;

endpackage
