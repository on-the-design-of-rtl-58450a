// fp_multiplier: significand multiplier feeding the rounding unit.
//
// Inputs are two finite factorings (s, e, f) with biased exponents (at least
// 1) and significands of 1 integer and P-1 fraction bits. Output:
//   s_prod = s1 xor s2
//   e_prod = e1 + e2 - bias          (signed, biased, width N+3)
//   f_prod = f1 * f2                  (2 integer + 2P-2 fraction bits)
// When both significands are normal (>= 1) the product is reduced to its
// P-representative: P fraction bits are kept and the rest is ORed into one
// sticky bit at fraction position P+1, the lower bits being zero. When an
// operand is denormal the product can have many leading zeros, so the exact
// product is passed on. Combinational. Sign, exponent and the
// representative follow the source architecture; keeping the exact product for denormal
// operands is this design's choice.
module fp_multiplier
  import fpu_pkg::*;
#(
  parameter int unsigned N = N_DEFAULT,
  parameter int unsigned P = P_DEFAULT,
  localparam int unsigned EW = N + 3
) (
  input  logic                 s1,
  input  logic [N-1:0]         e1,
  input  logic [P-1:0]         f1,
  input  logic                 s2,
  input  logic [N-1:0]         e2,
  input  logic [P-1:0]         f2,
  output logic                 s_prod,
  output logic signed [EW-1:0] e_prod,
  output logic [2*P-1:0]       f_prod
);

  logic [2*P-1:0] prod;

  always_comb begin
    prod   = (2*P)'(f1) * (2*P)'(f2);
    s_prod = s1 ^ s2;
    e_prod = EW'(e1) + EW'(e2) - EW'(bias_of(N));
    if (f1[P-1] && f2[P-1])
      f_prod = {prod[2*P-1:P-2], |prod[P-3:0], (P-3)'(0)};
    else
      f_prod = prod;
  end

endmodule
