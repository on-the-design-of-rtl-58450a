// fp_add_align_tb: adder preprocessing for N = 5, P = 8.
//
// Random operands with biased exponents 1..30 (half of the pairs with equal
// exponents, denormal significands allowed at exponent 1). Expected: the
// operand with the larger exponent comes out as A (no swap on a tie), and
// fb_rep is the (P+1)-representative of the other significand divided by
// 2^delta, worked out with integer division and remainder on the grid
// 2^-(P+1) plus half a unit when the remainder is nonzero. Watchdog included.
module fp_add_align_tb;
  localparam int N  = 5;
  localparam int P  = 8;
  localparam int NV = 50000;

  logic clk = 0;
  always #5 clk = ~clk;

  logic         s1, s2, sa, sb, swapped;
  logic [N-1:0] e1, e2, ea;
  logic [P-1:0] f1, f2, fa;
  logic [P+2:0] fb_rep;

  fp_add_align #(.N(N), .P(P)) dut (.*);

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
    int xea, xfa, xsa, xsb, eb, fb, d, y;
    logic xsw;
    for (int v = 0; v < NV; v++) begin
      @(posedge clk);
      s1 = 1'($urandom); s2 = 1'($urandom);
      e1 = N'($urandom_range(1, 30));
      e2 = ($urandom_range(0, 1) == 0) ? e1 : N'($urandom_range(1, 30));
      f1 = rand_sig(e1); f2 = rand_sig(e2);
      #1;
      xsw = (e2 > e1);
      if (xsw) begin xea = e2; xfa = f2; xsa = s2; eb = e1; fb = f1; xsb = s1; end
      else     begin xea = e1; xfa = f1; xsa = s1; eb = e2; fb = f2; xsb = s2; end
      d = xea - eb; if (d > P + 2) d = P + 2;
      y = 2 * ((fb * 4) / (1 << d)) + (((fb * 4) % (1 << d)) != 0 ? 1 : 0);
      checks++;
      if (swapped !== xsw || ea !== N'(xea) || fa !== P'(xfa) || sa !== 1'(xsa) ||
          sb !== 1'(xsb) || fb_rep !== (P+3)'(y)) begin
        failures++;
        if (failures < 10) $display("FAIL e1=%0d f1=%h e2=%0d f2=%h got %b %0d %h %h exp %b %0d %h %h",
                                    e1, f1, e2, f2, swapped, ea, fa, fb_rep, xsw, xea, xfa, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
