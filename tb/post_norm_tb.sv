// post_norm_tb: post-normalization for N = 5, P = 8.
//
// Every rounded significand f2 in [0, 2] (units of 2^-7) with a random
// exponent. The value f2 * 2^e_n must be preserved, f3 must fit one integer
// bit, and the exponent must step only on significand overflow. Watchdog.
module post_norm_tb;
  localparam int N  = 5;
  localparam int P  = 8;
  localparam int EW = N + 3;

  logic clk = 0;
  always #5 clk = ~clk;

  logic signed [EW-1:0] e_n, e2;
  logic [P:0]           f2;
  logic                 sig_ovf;
  logic [P-1:0]         f3;

  post_norm #(.N(N), .P(P)) dut (.*);

  int checks = 0, failures = 0;

  initial begin
    repeat (4 * ((1 << P) + 1) + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int xe, xf;
    for (int rep = 0; rep < 4; rep++)
      for (int x = 0; x <= (1 << P); x++) begin
        @(posedge clk);
        f2 = (P+1)'(x);
        sig_ovf = (x == (1 << P));
        e_n = EW'($urandom_range(0, 60)) - EW'(10);
        #1;
        if (x == (1 << P)) begin xe = int'(e_n) + 1; xf = x / 2; end
        else begin xe = int'(e_n); xf = x; end
        checks++;
        if (e2 !== EW'(xe) || f3 !== P'(xf)) begin
          failures++;
          if (failures < 10) $display("FAIL f2=%h e_n=%0d got %0d %h", f2, e_n, e2, f3);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
