// exp_rnd: exponent rounding, the last box of the rounding unit.
//
// Without an untrapped overflow it passes (e3, f3) through, the exponent
// reduced to its N-bit field. On an overflow with the overflow trap disabled
// the result is either infinity (exponent field all ones, significand 0) or the
// largest finite number (field 2^N - 2, significand 1.11..1), chosen by the
// rounding direction and the sign: nearest-even always gives infinity, toward
// zero never, toward +inf for positive and toward -inf for negative results.
// f_out keeps its integer (hidden) bit, so a caller packs {s, e_out,
// f_out[P-2:0]}. Combinational; function as in the source architecture.
module exp_rnd
  import fpu_pkg::*;
#(
  parameter int unsigned N = N_DEFAULT,
  parameter int unsigned P = P_DEFAULT,
  localparam int unsigned EW = N + 3
) (
  input  logic signed [EW-1:0] e3,
  input  logic        [P-1:0]  f3,
  input  logic                 overflow,
  input  logic                 ovf_en,
  input  logic                 s,
  input  round_mode_e          rmode,
  output logic        [N-1:0]  e_out,
  output logic        [P-1:0]  f_out
);

  always_comb begin
    if (overflow && !ovf_en) begin
      if (overflow_to_inf(rmode, s)) begin
        e_out = '1;
        f_out = '0;
      end else begin
        e_out = N'(emax_biased(N));
        f_out = '1;
      end
    end else begin
      e_out = e3[N-1:0];
      f_out = f3;
    end
  end

endmodule
