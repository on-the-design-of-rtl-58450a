// fp_add_align: preprocessing stage of the adder (swap, alignment shift and
// representative).
//
// Inputs are two finite factorings (s, e, f) with biased exponents (at least 1)
// and significands of 1 integer and P-1 fraction bits.
//   1. swap  - the exponents are compared and the operand with the larger one
//              becomes A (no swap on equal exponents); `swapped` reports it;
//   2. align - f_B is shifted right by delta = min(eA - eB, P+2) in a shifter
//              that keeps P+2 fraction bits;
//   3. rep   - in parallel with the shift, the bits of f_B that would land at
//              fraction position P+2 or beyond (those at index <= delta-3) are
//              ORed into a sticky bit that replaces position P+2.
// fb_rep = {shifted[P+2:1], sticky} is the (P+1)-representative of
// f_B * 2^-delta: 1 integer and P+2 fraction bits, three more than an operand.
// Combinational. Steps, shift clamp and width follow the addition algorithm
// the design is built on; the mask form of the sticky logic is this design's.
module fp_add_align
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
  output logic          sa,       // sign of the operand with the larger exponent
  output logic [N-1:0]  ea,       // the larger exponent
  output logic [P-1:0]  fa,       // its significand
  output logic          sb,       // sign of the other operand
  output logic [P+2:0]  fb_rep,   // rep_{P+1}(f_B * 2^-delta)
  output logic          swapped
);

  localparam int unsigned DW = $clog2(P + 3) + 1;

  logic [N-1:0]  eb, ediff;
  logic [P-1:0]  fb;
  logic [DW-1:0] delta;
  logic [P+2:0]  fb_sh;
  logic [P-1:0]  lost_mask;
  logic          sticky;

  always_comb begin
    swapped = (e2 > e1);
    if (swapped) begin
      sa = s2; ea = e2; fa = f2;
      sb = s1; eb = e1; fb = f1;
    end else begin
      sa = s1; ea = e1; fa = f1;
      sb = s2; eb = e2; fb = f2;
    end
    ediff = ea - eb;
    delta = (ediff > N'(P + 2)) ? DW'(P + 2) : DW'(ediff);

    fb_sh     = {fb, 3'b000} >> delta;
    lost_mask = (delta >= DW'(3)) ? ((P'(1) << (delta - DW'(2))) - P'(1)) : '0;
    sticky    = |(fb & lost_mask);
    fb_rep    = {fb_sh[P+2:1], sticky};
  end

endmodule
