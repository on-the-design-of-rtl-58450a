// adjust_exp: exponent adjustment after post-normalization.
//
// Handles the two effects of significand rounding on the exponent:
//   ovf2 = (e2 == e_max + 1): rounding pushed the result into overflow.
//   e3   = e_max + 1 - alpha  if ovf_en and ovf2 (trapped overflow caused by
//                              rounding, wrapped by alpha = 3*2^(N-2));
//          biased 1            if the result was tiny, sits in the denormal
//                              representation (biased 0) and rounding made its
//                              significand normal (msb(f3) = 1);
//          e2                  otherwise.
// Exponents are biased signed integers; biased 0 and 1 both mean e_min, 0 for a
// denormal significand and 1 for a normal one, so the second case only changes
// the representation. Combinational. The rules follow the source architecture; testing
// for the denormal representation (e2 == 0) in the second case is this
// design's way of leaving a trapped-underflow result, already normal, alone.
module adjust_exp
  import fpu_pkg::*;
#(
  parameter int unsigned N = N_DEFAULT,
  localparam int unsigned EW = N + 3
) (
  input  logic signed [EW-1:0] e2,
  input  logic                 msb_f3,  // integer bit of the rounded significand
  input  logic                 tiny,
  input  logic                 ovf_en,
  output logic signed [EW-1:0] e3,
  output logic                 ovf2
);

  localparam int EMAXB = emax_biased(N);
  localparam int ALPHA = alpha_of(N);

  always_comb begin
    ovf2 = (e2 == EW'(EMAXB + 1));
    if (ovf_en && ovf2)                    e3 = EW'(EMAXB + 1 - ALPHA);
    else if (msb_f3 && tiny && e2 == '0)   e3 = EW'(1);
    else                                   e3 = e2;
  end

endmodule
