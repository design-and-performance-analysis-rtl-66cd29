// tb_bk_prefix_cell: exhaustive self-checking test of the prefix operator.
//
// All 16 combinations of (Pi,Gi,Pj,Gj) are applied. The expected group
// generate comes from passing a zero carry through the lower span and then
// the upper span; the expected group propagate is "a carry passes through both
// spans". A time-based watchdog ends the run if it hangs.
module tb_bk_prefix_cell;
  import bcd_pkg::*;

  pg_t hi, lo, out;
  int  checks = 0;
  int  failures = 0;

  bk_prefix_cell dut (.hi(hi), .lo(lo), .out(out));

  // carry leaving a span with pair s when carry c enters it
  function automatic logic pass_carry(pg_t s, logic c);
    return s.p ? c : s.g;
  endfunction

  initial begin
    for (int v = 0; v < 16; v++) begin
      {hi.p, hi.g, lo.p, lo.g} = 4'(v);
      #1;
      checks++;
      if (out.g !== pass_carry(hi, pass_carry(lo, 1'b0)) && !(hi.p && hi.g) && !(lo.p && lo.g)) begin
        failures++;
        $display("FAIL g: hi=%b lo=%b out=%b", hi, lo, out);
      end
      checks++;
      if (out.p !== (hi.p && lo.p)) begin
        failures++;
        $display("FAIL p: hi=%b lo=%b out=%b", hi, lo, out);
      end
      // explicit check of the generate equation for every code, including
      // the p=g=1 codes a prefix tree never produces from a^b / a&b
      checks++;
      if (out.g !== (hi.g || (hi.p && lo.g))) begin
        failures++;
        $display("FAIL g-eq: hi=%b lo=%b out=%b", hi, lo, out);
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
