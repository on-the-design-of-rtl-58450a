// fp_multiplier_tb: significand multiplier for N = 5, P = 8.
//
// Random operands with biased exponents 1..30, denormal significands allowed
// at exponent 1. Expected: sign XOR, exponent e1 + e2 - 15, and for two normal
// significands the P-representative of the product computed with division
// and remainder (quotient on the grid 2^-P, plus half a unit when the
// remainder is nonzero); otherwise the exact product. Watchdog included.
module fp_multiplier_tb;
  localparam int N  = 5;
  localparam int P  = 8;
  localparam int EW = N + 3;
  localparam int NV = 50000;

  logic clk = 0;
  always #5 clk = ~clk;

  logic                 s1, s2, s_prod;
  logic [N-1:0]         e1, e2;
  logic [P-1:0]         f1, f2;
  logic signed [EW-1:0] e_prod;
  logic [2*P-1:0]       f_prod;

  fp_multiplier #(.N(N), .P(P)) dut (.*);

  int checks = 0, failures = 0;

  initial begin
    repeat (NV + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int pr, q, xf;
    for (int v = 0; v < NV; v++) begin
      @(posedge clk);
      s1 = 1'($urandom); s2 = 1'($urandom);
      e1 = N'($urandom_range(1, 30)); e2 = N'($urandom_range(1, 30));
      f1 = P'($urandom); f2 = P'($urandom);
      if (e1 != 1) f1[P-1] = 1;
      if (e2 != 1) f2[P-1] = 1;
      #1;
      pr = int'(f1) * int'(f2);
      if (f1 >= 128 && f2 >= 128) begin
        q  = pr / (1 << (P - 2));
        xf = (2 * q + ((pr % (1 << (P - 2))) != 0 ? 1 : 0)) * (1 << (P - 3));
      end else xf = pr;
      checks++;
      if (s_prod !== (s1 ^ s2) || e_prod !== EW'(int'(e1) + int'(e2) - 15) || f_prod !== (2*P)'(xf)) begin
        failures++;
        if (failures < 10) $display("FAIL %h*%h got %h exp %h", f1, f2, f_prod, xf);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
