// tb_bk_adder4: exhaustive self-checking test of the 4-bit Brent-Kung adder.
//
// Every a, b (0..15) and cin (0,1) is applied, 512 vectors; {cout,sum} is
// compared with the integer sum a + b + cin. A time-based watchdog ends the
// run if it hangs.
module tb_bk_adder4;
  logic [3:0] a, b, sum;
  logic       cin, cout;
  int         checks = 0;
  int         failures = 0;

  bk_adder4 dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin
    for (int ia = 0; ia < 16; ia++)
      for (int ib = 0; ib < 16; ib++)
        for (int ic = 0; ic < 2; ic++) begin
          int expected;
          a = 4'(ia); b = 4'(ib); cin = 1'(ic);
          #1;
          expected = ia + ib + ic;
          checks++;
          if ({cout, sum} !== 5'(expected)) begin
            failures++;
            $display("FAIL %0d+%0d+%0d: got %0d", ia, ib, ic, {cout, sum});
          end
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
