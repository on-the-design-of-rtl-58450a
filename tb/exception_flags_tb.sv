// exception_flags_tb: all 48 legal combinations of the rounding unit's flags
// and the trap enables (OVERFLOW and TINY never come together). Expected values are written from the exception rules:
// overflow is the OVERFLOW flag; underflow needs tininess, and also an
// inexact result unless its trap is enabled; inexact is an inexact
// significand or an overflow delivered without trap; a trap is requested
// for an exception whose trap is enabled, the inexact trap only when neither
// the overflow nor the underflow trap is requested. Watchdog included.
module exception_flags_tb;
  logic clk = 0;
  always #5 clk = ~clk;

  logic overflow = 0, tiny = 0, sig_inexact = 0, ovf_en = 0, unf_en = 0, inx_en = 0;
  logic flag_overflow, flag_underflow, flag_inexact;
  logic trap_overflow, trap_underflow, trap_inexact;

  exception_flags dut (.*);

  int checks = 0, failures = 0;

  initial begin
    repeat (200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic xo, xu, xi, to, tu, ti;
    for (int c = 0; c < 64; c++) begin
      @(posedge clk);
      if (c[5] && c[4]) continue;   // overflow together with tiny
      {overflow, tiny, sig_inexact, ovf_en, unf_en, inx_en} = 6'(c);
      #1;
      xo = overflow;
      if (unf_en) xu = tiny;
      else        xu = tiny && sig_inexact;
      xi = sig_inexact || (overflow && !ovf_en);
      to = xo && ovf_en;
      tu = xu && unf_en;
      ti = xi && inx_en && !to && !tu;
      checks++;
      if ({flag_overflow, flag_underflow, flag_inexact, trap_overflow, trap_underflow, trap_inexact}
          !== {xo, xu, xi, to, tu, ti}) begin
        failures++;
        $display("FAIL in=%b got %b%b%b %b%b%b exp %b%b%b %b%b%b", 6'(c), flag_overflow, flag_underflow,
                 flag_inexact, trap_overflow, trap_underflow, trap_inexact, xo, xu, xi, to, tu, ti);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
