// tb_bcd_workloads: the two configurations the adder is built and compared
// in, an 8-digit (32-bit) and a 32-digit (128-bit) BCD adder, side by side.
//
// Both instances get the same kind of stimulus: 3000 random valid BCD
// additions with random carry in, plus the worst-case carry chain
// (all nines + 0 + carry in) and all nines + all nines. Results are checked
// against a digit-by-digit decimal model that takes the digit count as an
// argument. Each instance is combinational and given one time unit to settle.
module tb_bcd_workloads;
  localparam int NMAX = 32;
  localparam int WMAX = 4 * NMAX;

  logic [31:0]  a8, b8, s8;
  logic         c8, co8;
  logic [127:0] a32, b32, s32;
  logic         c32, co32;
  int           checks = 0;
  int           failures = 0;

  bcd_adder_bka #(.N_DIGITS(8))  u_8digit  (.A(a8),  .B(b8),  .Cin(c8),  .Sum(s8),  .Cout(co8));
  bcd_adder_bka #(.N_DIGITS(32)) u_32digit (.A(a32), .B(b32), .Cin(c32), .Sum(s32), .Cout(co32));

  function automatic logic [WMAX:0] model(input logic [WMAX-1:0] x, input logic [WMAX-1:0] y,
                                          input logic ci, input int n);
    logic [WMAX:0] r = '0;   // {carry out, sum}, carry out placed at bit 4*n
    int c = int'(ci);
    for (int k = 0; k < n; k++) begin
      int t = int'(x[4*k +: 4]) + int'(y[4*k +: 4]) + c;
      r[4*k +: 4] = 4'(t % 10);
      c = (t >= 10) ? 1 : 0;
    end
    r[4*n] = 1'(c);
    return r;
  endfunction

  function automatic logic [WMAX-1:0] rand_bcd(input int n);
    logic [WMAX-1:0] v = '0;
    for (int k = 0; k < n; k++) v[4*k +: 4] = 4'($urandom_range(9));
    return v;
  endfunction

  function automatic logic [WMAX-1:0] all_nines(input int n);
    logic [WMAX-1:0] v = '0;
    for (int k = 0; k < n; k++) v[4*k +: 4] = 4'd9;
    return v;
  endfunction

  task automatic run8(input logic [WMAX-1:0] x, input logic [WMAX-1:0] y, input logic ci);
    logic [WMAX:0] e = model(x, y, ci, 8);
    a8 = x[31:0]; b8 = y[31:0]; c8 = ci;
    #1;
    checks++;
    if (s8 !== e[31:0] || co8 !== e[32]) begin
      failures++;
      $display("FAIL 8-digit %h+%h+%b: got %b %h", a8, b8, c8, co8, s8);
    end
  endtask

  task automatic run32(input logic [WMAX-1:0] x, input logic [WMAX-1:0] y, input logic ci);
    logic [WMAX:0] e = model(x, y, ci, 32);
    a32 = x; b32 = y; c32 = ci;
    #1;
    checks++;
    if (s32 !== e[127:0] || co32 !== e[128]) begin
      failures++;
      $display("FAIL 32-digit %h+%h+%b: got %b %h", a32, b32, c32, co32, s32);
    end
  endtask

  initial begin
    run8(all_nines(8), '0, 1'b1);
    run8(all_nines(8), all_nines(8), 1'b1);
    run32(all_nines(32), '0, 1'b1);
    run32(all_nines(32), all_nines(32), 1'b1);
    for (int i = 0; i < 3000; i++) begin
      run8(rand_bcd(8), rand_bcd(8), 1'($urandom_range(1)));
      run32(rand_bcd(32), rand_bcd(32), 1'($urandom_range(1)));
    end
    // 8-digit worst case, checked against the literal answer
    a8 = 32'h99999999; b8 = 32'h00000000; c8 = 1'b1; #1;
    checks++;
    if (s8 !== 32'h0 || co8 !== 1'b1) begin failures++; $display("FAIL 8-digit ripple"); end
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
