// tb_bcd_digit_adder: exhaustive self-checking test of the one-digit BCD
// adder. Every pair of valid digits (0..9) with cin 0 and 1 is applied (200
// vectors); sum and cout are compared with (a+b+cin) mod 10 and
// (a+b+cin) >= 10. It also counts how often each case of the correction
// happened: no correction, correction of a sum 10..15, and correction of a
// sum 16..19 (binary carry out), and fails if one never did.
module tb_bcd_digit_adder;
  import bcd_pkg::*;

  bcd_digit_t a, b, sum;
  logic       cin, cout;
  int         checks = 0;
  int         failures = 0;
  int         n_plain = 0, n_corr_over9 = 0, n_corr_carry = 0;

  bcd_digit_adder dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin
    for (int ia = 0; ia < 10; ia++)
      for (int ib = 0; ib < 10; ib++)
        for (int ic = 0; ic < 2; ic++) begin
          int total;
          a = 4'(ia); b = 4'(ib); cin = 1'(ic);
          #1;
          total = ia + ib + ic;
          if (total < 10) n_plain++;
          else if (total < 16) n_corr_over9++;
          else n_corr_carry++;
          checks++;
          if (sum !== 4'(total % 10) || cout !== (total >= 10)) begin
            failures++;
            $display("FAIL %0d+%0d+%0d: got cout=%b sum=%0d", ia, ib, ic, cout, sum);
          end
        end
    $display("cases: no correction %0d, corrected 10..15 %0d, corrected 16..19 %0d",
             n_plain, n_corr_over9, n_corr_carry);
    checks++;
    if (n_plain == 0 || n_corr_over9 == 0 || n_corr_carry == 0) begin
      failures++;
      $display("FAIL a correction case was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
