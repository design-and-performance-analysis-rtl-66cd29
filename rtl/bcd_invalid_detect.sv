// bcd_invalid_detect: tells whether a binary digit sum needs BCD correction.
//
// The first adder of a BCD digit stage yields a 4-bit binary sum and a carry
// out. That result is not a valid BCD digit if the carry out is set (sum of
// 16..19) or if the 4-bit sum exceeds 9 (1010..1111). Both conditions are the
// design's. A 4-bit value exceeds 9 exactly when bit 3 is set together with
// bit 2 or bit 1, so the flag is
//   invalid = bin_cout | (bin_sum[3] & bin_sum[2]) | (bin_sum[3] & bin_sum[1]).
// The flag is both the decimal carry out of the digit and the selector of the
// +6 correction. Purely combinational.
module bcd_invalid_detect (
  input  logic [3:0] bin_sum,   // binary sum from the first adder
  input  logic       bin_cout,  // carry out of the first adder
  output logic       invalid    // correction needed, decimal carry out
);

  always_comb begin
    invalid = bin_cout
            | (bin_sum[3] & bin_sum[2])
            | (bin_sum[3] & bin_sum[1]);
  end

endmodule
