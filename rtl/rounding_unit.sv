// rounding_unit: IEEE rounding with exception detection and exponent wrapping.
//
// Input is a factoring (s_in, e_in, f_in): sign, biased exponent (signed, may
// lie outside the field range) and a fixed-point significand with 2 integer
// and FI fraction bits. The producer (adder or multiplier) only has to deliver
// a value that agrees with the exact result in every bit that can influence
// rounding; the unit then returns:
//   * the rounded result r(x) when no trap is taken,
//   * r(x * 2^-alpha) on a trapped overflow (ovf_en and OVERFLOW),
//   * r(x * 2^+alpha) on a trapped underflow (unf_en and TINY),
// with alpha = 3*2^(N-2), together with the flags
//   overflow    - the result rounded with unbounded exponent exceeds x_max
//   tiny        - 0 < |value| < 2^e_min before rounding
//   sig_inexact - significand rounding lost information.
// Inexact is sig_inexact | (overflow & ~ovf_en); underflow is tiny when the
// underflow trap is enabled and tiny & sig_inexact otherwise (see fpu_top).
//
// The data path is a chain of six boxes: normalization shift, final sticky
// merge (rep_p), significand rounding, post-normalization, exponent adjust and
// exponent rounding. overflow = ovf1 | ovf2: the value is already too large
// before rounding, or rounding carried it to e_max + 1. The output exponent is
// the N-bit field (0 for zero and denormals, all ones for infinity) and f_out
// carries the hidden bit. Purely combinational. Structure, flags and wrapping
// follow the published rounding unit; the encodings are this design's.
module rounding_unit
  import fpu_pkg::*;
#(
  parameter int unsigned N  = N_DEFAULT,
  parameter int unsigned P  = P_DEFAULT,
  parameter int unsigned FI = 2 * P - 2,
  localparam int unsigned EW = N + 3
) (
  input  logic                 s_in,
  input  logic signed [EW-1:0] e_in,
  input  logic        [FI+1:0] f_in,
  input  round_mode_e          rmode,
  input  logic                 unf_en,
  input  logic                 ovf_en,
  output logic                 s_out,
  output logic        [N-1:0]  e_out,
  output logic        [P-1:0]  f_out,
  output logic                 tiny,
  output logic                 overflow,
  output logic                 sig_inexact
);

  logic signed [EW-1:0] e_n, e2, e3;
  logic        [P+2:0]  f_n;
  logic        [P+1:0]  f1;
  logic        [P:0]    f2;
  logic        [P-1:0]  f3;
  logic                 ovf1, ovf2, sig_ovf;

  norm_shift #(.N(N), .P(P), .FI(FI)) u_norm_shift (
    .e_in, .f_in, .unf_en, .ovf_en, .e_n, .f_n, .tiny, .ovf1
  );

  rep_p #(.P(P)) u_rep_p (.f_n, .f1);

  sig_rnd #(.P(P)) u_sig_rnd (
    .f1, .s(s_in), .rmode, .f2, .sig_ovf, .sig_inexact
  );

  post_norm #(.N(N), .P(P)) u_post_norm (.e_n, .f2, .sig_ovf, .e2, .f3);

  adjust_exp #(.N(N)) u_adjust_exp (
    .e2, .msb_f3(f3[P-1]), .tiny, .ovf_en, .e3, .ovf2
  );

  assign overflow = ovf1 | ovf2;
  assign s_out    = s_in;

  exp_rnd #(.N(N), .P(P)) u_exp_rnd (
    .e3, .f3, .overflow, .ovf_en, .s(s_in), .rmode, .e_out, .f_out
  );

endmodule
