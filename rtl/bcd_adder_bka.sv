// bcd_adder_bka: N-digit BCD adder (default 32 digits, 128-bit operands).
//
// A and B hold N_DIGITS packed BCD digits, digit 0 (least significant) in
// bits 3:0. The adder is a chain of N_DIGITS one-digit BCD adders, each built
// from two 4-bit Brent-Kung prefix adders; the decimal carry of digit k feeds
// digit k+1, Cin enters digit 0 and Cout leaves the top digit. The prefix
// trees speed up the work inside each digit, while carries between digits
// ripple. The cascade, the 32-digit default and the port names (A, B, Cin,
// Sum, Cout) follow the design; the parameter is added so that smaller
// configurations (for example 8 digits) can be built. Purely combinational:
// the worst-case path runs through every digit (for example
// 99..9 + 00..0 with Cin = 1).
module bcd_adder_bka
  import bcd_pkg::*;
#(
  parameter int unsigned N_DIGITS = 32
) (
  input  logic [BCD_BITS*N_DIGITS-1:0] A,
  input  logic [BCD_BITS*N_DIGITS-1:0] B,
  input  logic                         Cin,
  output logic [BCD_BITS*N_DIGITS-1:0] Sum,
  output logic                         Cout
);

  logic [N_DIGITS:0] carry;  // carry[k] enters digit k

  assign carry[0] = Cin;

  for (genvar k = 0; k < N_DIGITS; k++) begin : g_digit
    bcd_digit_adder d (
      .a   (A[BCD_BITS*k +: BCD_BITS]),
      .b   (B[BCD_BITS*k +: BCD_BITS]),
      .cin (carry[k]),
      .sum (Sum[BCD_BITS*k +: BCD_BITS]),
      .cout(carry[k+1])
    );
  end

  assign Cout = carry[N_DIGITS];

endmodule
