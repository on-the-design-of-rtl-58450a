// fp_adder_tb: significand adder for N = 5, P = 8.
//
// Random operands with biased exponents 1..30 (denormal significands allowed
// at exponent 1). The expected output follows the addition algorithm in
// integer arithmetic with division and remainder: the smaller operand, in
// units of 2^-(P+1), is divided by 2^delta; a nonzero remainder adds the
// half unit that marks an open interval; then sign and magnitude of the sum
// are taken on the grid 2^-(P+2). Checks s_sum, e_sum and g. Watchdog.
module fp_adder_tb;
  localparam int N  = 5;
  localparam int P  = 8;
  localparam int NV = 50000;

  logic clk = 0;
  always #5 clk = ~clk;

  logic         s1, s2, s_sum;
  logic [N-1:0] e1, e2, e_sum;
  logic [P-1:0] f1, f2;
  logic [P+3:0] g;

  fp_adder #(.N(N), .P(P)) dut (.*);

  int checks = 0, failures = 0;

  initial begin
    repeat (NV + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [P-1:0] rand_sig(logic [N-1:0] e);
    logic [P-1:0] f = P'($urandom);
    f[P-1] = (e != 1) ? 1'b1 : 1'($urandom);
    return f;
  endfunction

  initial begin
    int ea, eb, fa, fb, sa, sb, d, q, x, y, xg, xs;
    for (int v = 0; v < NV; v++) begin
      @(posedge clk);
      s1 = 1'($urandom); s2 = 1'($urandom);
      e1 = N'($urandom_range(1, 30));
      e2 = ($urandom_range(0, 1) == 0) ? e1 : N'($urandom_range(1, 30));
      f1 = rand_sig(e1); f2 = rand_sig(e2);
      #1;
      if (e2 > e1) begin ea = e2; fa = f2; sa = s2; eb = e1; fb = f1; sb = s1; end
      else         begin ea = e1; fa = f1; sa = s1; eb = e2; fb = f2; sb = s2; end
      d = ea - eb; if (d > P + 2) d = P + 2;
      q = (fb * 4) / (1 << d);
      y = 2 * q + (((fb * 4) % (1 << d)) != 0 ? 1 : 0);
      x = fa * 8;
      if (sa == sb)    begin xg = x + y; xs = sa; end
      else if (x >= y) begin xg = x - y; xs = sa; end
      else             begin xg = y - x; xs = sb; end
      checks++;
      if (g !== (P+4)'(xg) || s_sum !== 1'(xs) || e_sum !== N'(ea)) begin
        failures++;
        if (failures < 10) $display("FAIL %b %0d %h + %b %0d %h got %b %0d %h exp %0d %0d %h",
                                    s1, e1, f1, s2, e2, f2, s_sum, e_sum, g, xs, ea, xg);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
