// norm_shift_tb: normalization shift box against a bit-serial model.
//
// Small format (N = 5, P = 8, 14 input fraction bits). The model normalizes
// one position at a time: shift right (collecting a sticky bit) while the
// significand is 2 or more, shift left while it is below 1, then for a tiny
// value without underflow trap shift right until the exponent reaches e_min.
// It then applies the alpha = 24 wrap of an enabled trap. e_n, f_n, tiny and
// ovf1 are compared for random inputs, one per clock, under a watchdog.
module norm_shift_tb;
  import fpu_pkg::*;

  localparam int N  = 5;
  localparam int P  = 8;
  localparam int FI = 14;
  localparam int EW = N + 3;
  localparam int NV = 50000;

  logic clk = 0;
  always #5 clk = ~clk;

  logic signed [EW-1:0] e_in, e_n;
  logic [FI+1:0]        f_in;
  logic                 unf_en, ovf_en, tiny, ovf1;
  logic [P+2:0]         f_n;

  norm_shift #(.N(N), .P(P), .FI(FI)) dut (.*);

  int checks = 0, failures = 0;

  initial begin
    repeat (NV + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint f;
    int ce, xe;
    logic st, xt, xo;
    for (int v = 0; v < NV; v++) begin
      @(posedge clk);
      unf_en = 1'($urandom);
      ovf_en = 1'($urandom);
      e_in   = EW'($urandom_range(0, 70)) - EW'(20);
      f_in   = (FI+2)'($urandom) >> $urandom_range(0, FI + 2);
      #1;
      f  = longint'(f_in);
      ce = int'(e_in) - FI + P + 2;   // value = f * 2^(ce - bias - (P+2))
      st = 0; xt = 0; xo = 0; xe = 0;
      if (f != 0) begin
        while (f >= (64'd1 << (P + 3))) begin st |= f[0]; f = f >> 1; ce++; end
        while (f < (64'd1 << (P + 2)))  begin f = f << 1; ce--; end
        xt = (ce < 1);
        xo = (ce > 30);
        if (ovf_en && xo)      xe = ce - 24;
        else if (unf_en && xt) xe = ce + 24;
        else if (xt) begin
          while (ce < 1) begin st |= f[0]; f = f >> 1; ce++; end
          xe = 0;
        end else xe = ce;
        f[0] = f[0] | st;
      end
      checks++;
      if (e_n !== EW'(xe) || f_n !== (P+3)'(f) || tiny !== xt || ovf1 !== xo) begin
        failures++;
        if (failures < 20)
          $display("FAIL e_in=%0d f_in=%h ue=%b oe=%b got e=%0d f=%h t%b o%b exp e=%0d f=%h t%b o%b",
                   e_in, f_in, unf_en, ovf_en, e_n, f_n, tiny, ovf1, xe, f[P+2:0], xt, xo);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
