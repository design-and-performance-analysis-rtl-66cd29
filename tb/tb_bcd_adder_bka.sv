// tb_bcd_adder_bka: end-to-end self-checking test of the N-digit BCD adder at
// its default size (32 digits, 128-bit operands, parameters left alone).
//
// Stimulus: four reference additions (1+2, 9+5, a 32-digit pattern plus
// 32 ones, and 9+9 with Cin=1), directed worst cases (a carry rippling
// through all 32 digits, all zeros, all nines), then random valid BCD
// operands with random Cin. The expected Sum and Cout come from a digit-by-
// digit decimal model written with integer arithmetic. The test also counts
// how often each mechanism of the adder happened (digit corrected because its
// binary sum was 10..15, digit corrected because the binary adder carried out,
// Cin set, Cout set, a carry that crossed every digit) and counts a failure
// for any that never did. The adder is combinational: each vector is given
// one time unit to settle.
module tb_bcd_adder_bka;
  localparam int N = 32;   // default digit count of bcd_adder_bka
  localparam int W = 4 * N;

  logic [W-1:0] A, B, Sum;
  logic         Cin, Cout;
  int           checks = 0;
  int           failures = 0;

  int n_corr_over9 = 0, n_corr_carry = 0, n_cin = 0, n_cout = 0, n_full_ripple = 0;

  bcd_adder_bka dut (.A(A), .B(B), .Cin(Cin), .Sum(Sum), .Cout(Cout));

  // Decimal model: also tallies which correction each digit needs and the
  // longest chain of consecutive digits that pass a carry on.
  task automatic model(input logic [W-1:0] x, input logic [W-1:0] y, input logic ci,
                       output logic [W-1:0] s, output logic co);
    int c = int'(ci);
    int chain = 0, longest = 0;
    for (int k = 0; k < N; k++) begin
      int t = int'(x[4*k +: 4]) + int'(y[4*k +: 4]) + c;
      if (t >= 16) n_corr_carry++;
      else if (t >= 10) n_corr_over9++;
      s[4*k +: 4] = 4'(t % 10);
      c = (t >= 10) ? 1 : 0;
      if (c == 1) begin
        chain++;
        if (chain > longest) longest = chain;
      end else begin
        chain = 0;
      end
    end
    co = 1'(c);
    if (longest == N) n_full_ripple++;
  endtask

  function automatic logic [W-1:0] rand_bcd();
    logic [W-1:0] v;
    for (int k = 0; k < N; k++) v[4*k +: 4] = 4'($urandom_range(9));
    return v;
  endfunction

  task automatic apply(input logic [W-1:0] x, input logic [W-1:0] y, input logic ci);
    logic [W-1:0] exp_s;
    logic         exp_c;
    A = x; B = y; Cin = ci;
    #1;
    model(x, y, ci, exp_s, exp_c);
    if (ci) n_cin++;
    if (exp_c) n_cout++;
    checks++;
    if (Sum !== exp_s || Cout !== exp_c) begin
      failures++;
      $display("FAIL A=%h B=%h Cin=%b: got Cout=%b Sum=%h, expected Cout=%b Sum=%h",
               x, y, ci, Cout, Sum, exp_c, exp_s);
    end
  endtask

  logic [W-1:0] nines;

  initial begin
    for (int k = 0; k < N; k++) nines[4*k +: 4] = 4'd9;

    // reference additions
    apply(W'(128'h1), W'(128'h2), 1'b0);
    apply(W'(128'h9), W'(128'h5), 1'b0);
    apply(W'(128'h12345678901234567890123456789012),
          W'(128'h11111111111111111111111111111111), 1'b0);
    apply(W'(128'h9), W'(128'h9), 1'b1);
    // spot checks of the exact values, independent of the model
    A = W'(128'h9); B = W'(128'h5); Cin = 1'b0; #1;
    checks++;
    if (Sum !== W'(128'h14) || Cout !== 1'b0) begin failures++; $display("FAIL 9+5"); end
    A = W'(128'h9); B = W'(128'h9); Cin = 1'b1; #1;
    checks++;
    if (Sum !== W'(128'h19) || Cout !== 1'b0) begin failures++; $display("FAIL 9+9+1"); end
    A = W'(128'h12345678901234567890123456789012);
    B = W'(128'h11111111111111111111111111111111); Cin = 1'b0; #1;
    checks++;
    if (Sum !== W'(128'h23456790012345679001234567900123) || Cout !== 1'b0) begin
      failures++; $display("FAIL 32-digit pattern: %h", Sum);
    end

    // directed worst cases
    apply(nines, '0, 1'b1);      // carry ripples through every digit
    checks++;
    if (Sum !== '0 || Cout !== 1'b1) begin failures++; $display("FAIL 99..9+1"); end
    apply('0, '0, 1'b0);
    apply(nines, nines, 1'b1);   // every digit 19: binary carry + correction
    apply(nines, nines, 1'b0);

    // random valid BCD operands
    for (int i = 0; i < 5000; i++) apply(rand_bcd(), rand_bcd(), 1'($urandom_range(1)));

    $display("mechanisms: corrected 10..15 %0d, corrected 16..19 %0d, Cin=1 %0d, Cout=1 %0d, full ripple %0d",
             n_corr_over9, n_corr_carry, n_cin, n_cout, n_full_ripple);
    checks++;
    if (n_corr_over9 == 0 || n_corr_carry == 0 || n_cin == 0 || n_cout == 0 || n_full_ripple == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
