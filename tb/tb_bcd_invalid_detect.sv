// tb_bcd_invalid_detect: exhaustive self-checking test of the invalid-digit
// detector. All 32 combinations of the 4-bit binary sum and its carry are
// applied; the flag must be set exactly when the 5-bit value exceeds 9.
module tb_bcd_invalid_detect;
  logic [3:0] bin_sum;
  logic       bin_cout, invalid;
  int         checks = 0;
  int         failures = 0;
  int         n_flagged = 0;

  bcd_invalid_detect dut (.bin_sum(bin_sum), .bin_cout(bin_cout), .invalid(invalid));

  initial begin
    for (int v = 0; v < 32; v++) begin
      {bin_cout, bin_sum} = 5'(v);
      #1;
      checks++;
      if (invalid !== (v > 9)) begin
        failures++;
        $display("FAIL value %0d: invalid=%b", v, invalid);
      end
      if (invalid) n_flagged++;
    end
    checks++;
    if (n_flagged != 22) begin
      failures++;
      $display("FAIL flagged %0d values, expected 22", n_flagged);
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
