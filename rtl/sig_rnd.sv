// sig_rnd: significand rounding.
//
// The input f1 is a P-representative: P kept bits (1 integer, P-1 fraction),
// then the round bit and the sticky bit. Rounding is a decision whether to add
// one unit in the last kept place; it depends on the LSB, the round bit, the
// sticky bit, the sign and the rounding direction:
//   nearest-even : round & (sticky | lsb)
//   toward zero  : never
//   toward +inf  : ~sign & (round | sticky)
//   toward -inf  :  sign & (round | sticky)
// f2 = kept + increment lies in [0, 2] and has 2 integer bits. sig_ovf flags
// f2 = 2 (significand overflow); sig_inexact flags f2 != f1, i.e. round|sticky.
// Combinational. The source architecture defines nearest-even in full and states that
// the directed modes also take the sign; the three other decisions are the
// standard IEEE ones.
module sig_rnd
  import fpu_pkg::*;
#(
  parameter int unsigned P = P_DEFAULT
) (
  input  logic [P+1:0]  f1,          // 1 integer + P+1 fraction bits
  input  logic          s,           // sign of the result
  input  round_mode_e   rmode,
  output logic [P:0]    f2,          // 2 integer + P-1 fraction bits
  output logic          sig_ovf,
  output logic          sig_inexact
);

  logic [P-1:0] kept;
  logic         lsb, rnd, stk, inc;

  always_comb begin
    kept = f1[P+1:2];
    lsb  = f1[2];
    rnd  = f1[1];
    stk  = f1[0];
    case (rmode)
      RM_RNE:  inc = rnd & (stk | lsb);
      RM_RZ:   inc = 1'b0;
      RM_RPI:  inc = ~s & (rnd | stk);
      default: inc =  s & (rnd | stk);
    endcase
    f2          = {1'b0, kept} + (P+1)'(inc);
    sig_ovf     = f2[P];
    sig_inexact = rnd | stk;
  end

endmodule
