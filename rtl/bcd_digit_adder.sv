// bcd_digit_adder: one-digit BCD adder built from two 4-bit Brent-Kung adders.
//
// Operation:
//  1. u_bin adds the digits a, b and the decimal carry cin in binary
//     (result 0..19 as a 4-bit sum and a carry out).
//  2. u_detect flags a result above 9; the flag is the digit's decimal carry
//     out (cout).
//  3. u_corr adds the correction 0110 (6) to the binary sum when the flag is
//     set and 0000 otherwise, with its own carry in tied to 0. Its carry out
//     only marks the wrap past 15 that the correction is meant to cause and is
//     left unused; the corrected 4 bits are the BCD sum digit.
// This structure (two adders, detection between them, correction operand
// 0,flag,flag,0, second carry in 0) is the design's. Inputs are assumed to be
// valid BCD digits (0..9); other codes give an unspecified but deterministic
// result. Purely combinational: delay of two 4-bit prefix adders plus the
// detection logic.
module bcd_digit_adder
  import bcd_pkg::*;
(
  input  bcd_digit_t a,
  input  bcd_digit_t b,
  input  logic       cin,
  output bcd_digit_t sum,
  output logic       cout
);

  logic [3:0] bin_sum;
  logic       bin_cout;
  logic       invalid;
  logic [3:0] correction;
  logic       corr_cout;  // carry out of the correction adder, not used

  bk_adder4 u_bin (
    .a   (a),
    .b   (b),
    .cin (cin),
    .sum (bin_sum),
    .cout(bin_cout)
  );

  bcd_invalid_detect u_detect (
    .bin_sum (bin_sum),
    .bin_cout(bin_cout),
    .invalid (invalid)
  );

  assign correction = invalid ? BCD_CORRECTION : 4'd0;

  bk_adder4 u_corr (
    .a   (bin_sum),
    .b   (correction),
    .cin (1'b0),
    .sum (sum),
    .cout(corr_cout)
  );

  assign cout = invalid;

endmodule
