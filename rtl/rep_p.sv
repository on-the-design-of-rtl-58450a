// rep_p: final sticky-bit merge of the rounding unit.
//
// The input f_n is the (P+1)-representative of a significand in [0, 2)
// (1 integer bit, P+2 fraction bits, the last one a sticky bit). Its
// P-representative keeps the first P fraction bits and replaces the tail from
// position P+1 on by the OR of that tail. Because the input tail is already two
// bits long (round position P+1 and sticky P+2), the box is a single OR gate:
// f1 = {f_n[P+2:2], f_n[1] | f_n[0]}. Output: 1 integer and P+1 fraction bits,
// i.e. P kept bits, a round bit and a sticky bit. Combinational.
// Follows the published description of the box and of sticky bits.
module rep_p
  import fpu_pkg::*;
#(
  parameter int unsigned P = P_DEFAULT
) (
  input  logic [P+2:0] f_n,  // 1 integer + P+2 fraction bits
  output logic [P+1:0] f1    // 1 integer + P+1 fraction bits
);

  assign f1 = {f_n[P+2:2], f_n[1] | f_n[0]};

endmodule
