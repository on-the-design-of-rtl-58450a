// sig_rnd_tb: exhaustive test of significand rounding for P = 8.
//
// Every representative f1 (10 bits), both signs and all four directions.
// The expected value is worked out on quarter units: lo = floor(f1/4), the
// remainder r in {0..3} says exact / below half / half / above half; the
// direction then picks lo or lo+1 (ties to the even one). Checks f2, the
// significand overflow (f2 = 2) and sig_inexact (r != 0). Watchdog included.
module sig_rnd_tb;
  import fpu_pkg::*;
  localparam int P = 8;

  logic clk = 0;
  always #5 clk = ~clk;

  logic [P+1:0] f1;
  logic         s, sig_ovf, sig_inexact;
  round_mode_e  rmode;
  logic [P:0]   f2;

  sig_rnd #(.P(P)) dut (.*);

  int checks = 0, failures = 0;

  initial begin
    repeat ((1 << (P + 5)) + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lo, r, e;
    for (int x = 0; x < (1 << (P + 2)); x++)
      for (int sg = 0; sg < 2; sg++)
        for (int m = 0; m < 4; m++) begin
          @(posedge clk);
          f1 = (P+2)'(x); s = 1'(sg); rmode = round_mode_e'(m);
          #1;
          lo = x / 4; r = x % 4;
          case (m)
            0: e = (r > 2 || (r == 2 && lo % 2 == 1)) ? lo + 1 : lo;
            1: e = lo;
            2: e = (sg == 0 && r != 0) ? lo + 1 : lo;
            default: e = (sg == 1 && r != 0) ? lo + 1 : lo;
          endcase
          checks++;
          if (f2 !== (P+1)'(e) || sig_ovf !== (e == (1 << P)) || sig_inexact !== (r != 0)) begin
            failures++;
            if (failures < 10) $display("FAIL f1=%h s=%0d m=%0d got %h exp %h", f1, sg, m, f2, e);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
