// fpu_top: IEEE floating point unit for addition, subtraction and
// multiplication of finite operands, with all four rounding directions and
// trapped overflow/underflow.
//
// Each operation is split into a bounded-precision functional unit and one
// shared rounding unit. The functional unit never computes the exact result;
// it delivers a value that rounds exactly like it (the adder keeps three extra
// bits, the multiplier a sticky-bit representative). Steps:
//   unpack  - an IEEE string {s, field, frac} becomes a factoring: exponent
//             max(field, 1), significand {field != 0, frac};
//   compute - fp_adder (subtraction flips the sign of b) or fp_multiplier;
//   round   - rounding_unit, which also wraps the exponent on trapped
//             overflow and underflow;
//   flags   - exception_flags turns the rounding unit's OVERFLOW, TINY and
//             SIG_INEXACT into the overflow, underflow and inexact status
//             flags and into trap requests (overflow and underflow traps take
//             precedence over the inexact trap).
// An exact zero sum of operands of opposite signs gets sign + (or - when
// rounding toward -inf). NaN and infinite operands are outside this unit:
// operand_special flags them and the result is then not meaningful.
// Interface: op, rmode, the three trap enables, a, b in; result, status
// flags and trap requests out. The
// unit is combinational: result and flags are valid in the same cycle.
// The split into adder, multiplier and rounding unit and the flag rules follow
// the source architecture; unpacking, the zero sign and the IEEE double default format are
// this design's choices.
module fpu_top
  import fpu_pkg::*;
#(
  parameter int unsigned N = N_DEFAULT,
  parameter int unsigned P = P_DEFAULT,
  localparam int unsigned W  = N + P,      // IEEE string width (1 + N + P-1)
  localparam int unsigned EW = N + 3,
  localparam int unsigned FI = 2 * P - 2
) (
  input  fpu_op_e        op,
  input  round_mode_e    rmode,
  input  logic           unf_en,          // underflow trap enabled
  input  logic           ovf_en,          // overflow trap enabled
  input  logic           inx_en,          // inexact trap enabled
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [W-1:0]   result,
  output logic           flag_overflow,
  output logic           flag_underflow,
  output logic           flag_inexact,
  output logic           trap_overflow,   // invoke the overflow trap handler
  output logic           trap_underflow,  // invoke the underflow trap handler
  output logic           trap_inexact,    // invoke the inexact trap handler
  output logic           tiny,            // tiny before rounding
  output logic           operand_special  // a or b is infinite or NaN
);

  // unpacked operands
  logic         sa, sb, sb_eff;
  logic [N-1:0] ea, eb;
  logic [P-1:0] fa, fb;

  always_comb begin
    sa = a[W-1];
    sb = b[W-1];
    ea = (a[W-2:P-1] == '0) ? N'(1) : a[W-2:P-1];
    eb = (b[W-2:P-1] == '0) ? N'(1) : b[W-2:P-1];
    fa = {a[W-2:P-1] != '0, a[P-2:0]};
    fb = {b[W-2:P-1] != '0, b[P-2:0]};
    sb_eff = (op == OP_SUB) ? ~sb : sb;
    operand_special = (a[W-2:P-1] == '1) || (b[W-2:P-1] == '1);
  end

  // functional units
  logic                 s_sum, s_prod;
  logic [N-1:0]         e_sum;
  logic [P+3:0]         g;
  logic signed [EW-1:0] e_prod;
  logic [2*P-1:0]       f_prod;

  fp_adder #(.N(N), .P(P)) u_adder (
    .s1(sa), .e1(ea), .f1(fa), .s2(sb_eff), .e2(eb), .f2(fb),
    .s_sum, .e_sum, .g
  );

  fp_multiplier #(.N(N), .P(P)) u_mult (
    .s1(sa), .e1(ea), .f1(fa), .s2(sb), .e2(eb), .f2(fb),
    .s_prod, .e_prod, .f_prod
  );

  // operand selection for the shared rounding unit
  logic                 r_s;
  logic signed [EW-1:0] r_e;
  logic [FI+1:0]        r_f;

  always_comb begin
    if (op == OP_MUL) begin
      r_s = s_prod;
      r_e = e_prod;
      r_f = f_prod;
    end else begin
      r_e = EW'(e_sum);
      r_f = {g, (FI - P - 2)'(0)};
      if (g == '0 && sa != sb_eff) r_s = (rmode == RM_RMI);
      else                         r_s = s_sum;
    end
  end

  logic         s_out, overflow, sig_inexact;
  logic [N-1:0] e_out;
  logic [P-1:0] f_out;

  rounding_unit #(.N(N), .P(P), .FI(FI)) u_round (
    .s_in(r_s), .e_in(r_e), .f_in(r_f), .rmode, .unf_en, .ovf_en,
    .s_out, .e_out, .f_out, .tiny, .overflow, .sig_inexact
  );

  assign result = {s_out, e_out, f_out[P-2:0]};

  exception_flags u_flags (
    .overflow, .tiny, .sig_inexact, .ovf_en, .unf_en, .inx_en,
    .flag_overflow, .flag_underflow, .flag_inexact,
    .trap_overflow, .trap_underflow, .trap_inexact
  );

endmodule
