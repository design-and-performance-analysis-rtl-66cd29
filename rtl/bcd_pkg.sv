// bcd_pkg: types and constants shared by the Brent-Kung BCD adder.
//
// pg_t is the (propagate, generate) pair that flows through the parallel-prefix
// carry network: p means "a carry entering this bit span leaves it", g means
// "this span produces a carry by itself". bcd_digit_t is one packed BCD digit
// (4 bits, values 0..9). BCD_CORRECTION is the decimal rule the adder
// applies: a binary digit sum above 9, or one that carries out
// of 4 bits, is made valid again by adding 6.
package bcd_pkg;

  typedef struct packed {
    logic p;  // propagate
    logic g;  // generate
  } pg_t;

  typedef logic [3:0] bcd_digit_t;

  localparam int unsigned BCD_BITS       = 4;
  localparam bcd_digit_t  BCD_CORRECTION = 4'd6;

endpackage
