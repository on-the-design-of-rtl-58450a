// post_norm: post-normalization after significand rounding.
//
// If rounding produced f2 = 2 (sig_ovf), the exponent is incremented and the
// significand becomes 1. The exponent path is an incrementer and a 2:1 mux
// selected by sig_ovf; the significand path ORs the two most significant bits
// of f2 (10.00..0 becomes 1.00..0, any other value keeps its single integer
// bit), dropping one integer bit. Combinational. Structure as in the
// published rounding unit diagram.
module post_norm
  import fpu_pkg::*;
#(
  parameter int unsigned N = N_DEFAULT,
  parameter int unsigned P = P_DEFAULT,
  localparam int unsigned EW = N + 3
) (
  input  logic signed [EW-1:0] e_n,     // exponent from the normalization shift
  input  logic        [P:0]    f2,      // rounded significand, 2 integer bits
  input  logic                 sig_ovf, // f2 = 2
  output logic signed [EW-1:0] e2,
  output logic        [P-1:0]  f3       // 1 integer + P-1 fraction bits
);

  logic signed [EW-1:0] e_inc;

  assign e_inc = e_n + EW'(1);
  assign e2    = sig_ovf ? e_inc : e_n;
  assign f3    = {f2[P] | f2[P-1], f2[P-2:0]};

endmodule
