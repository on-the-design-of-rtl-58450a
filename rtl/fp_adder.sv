// fp_adder: the adder's functional unit with its preprocessing.
//
// Inputs are two finite factorings (s, e, f): e is the biased exponent (at
// least 1; a denormal operand arrives with e = 1 and f < 1), f has 1 integer
// and P-1 fraction bits. fp_add_align swaps the operands so that A has the
// larger exponent and turns f_B into the (P+1)-representative of its aligned
// value; this module then adds f_A and that representative in sign-magnitude
// form (same signs: sum; different signs: the smaller magnitude is subtracted
// from the larger and the result takes the larger one's sign).
// Output is (s_sum, e_sum = eA, g): g has 2 integer and P+2 fraction bits,
// three more than an operand, which is enough for the rounding unit to round
// the exact sum correctly. A zero sum keeps the sign of A; the IEEE sign rule
// for exact zeros is applied by the caller. Combinational.
// The algorithm and widths follow the design this unit is built on.
module fp_adder
  import fpu_pkg::*;
#(
  parameter int unsigned N = N_DEFAULT,
  parameter int unsigned P = P_DEFAULT
) (
  input  logic          s1,
  input  logic [N-1:0]  e1,
  input  logic [P-1:0]  f1,
  input  logic          s2,
  input  logic [N-1:0]  e2,
  input  logic [P-1:0]  f2,
  output logic          s_sum,
  output logic [N-1:0]  e_sum,
  output logic [P+3:0]  g      // 2 integer + P+2 fraction bits
);

  logic          sa, sb, swapped;
  logic [P-1:0]  fa;
  logic [P+2:0]  fb_rep;
  logic [P+3:0]  opa, opb;

  fp_add_align #(.N(N), .P(P)) u_align (
    .s1, .e1, .f1, .s2, .e2, .f2, .sa, .ea(e_sum), .fa, .sb, .fb_rep, .swapped
  );

  always_comb begin
    opa = {1'b0, fa, 3'b000};
    opb = {1'b0, fb_rep};
    if (sa == sb) begin
      g     = opa + opb;
      s_sum = sa;
    end else if (opa >= opb) begin
      g     = opa - opb;
      s_sum = sa;
    end else begin
      g     = opb - opa;
      s_sum = sb;
    end
  end

endmodule
