// exception_flags: overflow, underflow and inexact exceptions from the
// rounding unit's flags, and the trap requests they raise.
//
// Inputs are the rounding unit's OVERFLOW, TINY (tiny before rounding) and
// SIG_INEXACT flags and the three trap enables; OVERFLOW and TINY are never
// raised together (checked by an assertion). An exception sets its status
// flag; if its trap is enabled, it also requests the trap handler:
//   overflow  = OVERFLOW
//   underflow = unf_en ? TINY : TINY & SIG_INEXACT
//               (with the trap enabled tininess alone counts; without it,
//               tininess must come with a loss of accuracy, taken here as an
//               inexact result)
//   inexact   = SIG_INEXACT | (OVERFLOW & ~ovf_en)
//               (an untrapped overflow delivers infinity or x_max, never exact)
//   trap_overflow  = overflow & ovf_en
//   trap_underflow = underflow & unf_en
//   trap_inexact   = inexact & inx_en, unless an overflow or underflow trap
//                    is requested: those take precedence.
// Combinational. The formulas for overflow, underflow, inexact and the trap
// precedence follow the design this unit is built on; choosing tiny before
// rounding and inexactness as the loss-of-accuracy test, and the one-hot trap
// request outputs, are this design's.
module exception_flags (
  input  logic overflow,
  input  logic tiny,
  input  logic sig_inexact,
  input  logic ovf_en,
  input  logic unf_en,
  input  logic inx_en,
  output logic flag_overflow,
  output logic flag_underflow,
  output logic flag_inexact,
  output logic trap_overflow,
  output logic trap_underflow,
  output logic trap_inexact
);

  always_comb begin
    flag_overflow  = overflow;
    flag_underflow = unf_en ? tiny : (tiny & sig_inexact);
    flag_inexact   = sig_inexact | (overflow & ~ovf_en);
    trap_overflow  = flag_overflow & ovf_en;
    trap_underflow = flag_underflow & unf_en;
    trap_inexact   = flag_inexact & inx_en & ~trap_overflow & ~trap_underflow;
  end

  // input rule: a result cannot be both too large and tiny, so at most one
  // trap handler is ever requested
  always_comb
    assert final (!(overflow && tiny))
      else $error("overflow and tiny raised together");

endmodule
