// norm_shift: the normalization shift box at the head of the rounding unit.
//
// Takes a factoring (e_in, f_in) whose significand f_in is a fixed-point number
// with 2 integer and FI fraction bits, and produces the normalized factoring
// (e_n, f_n) of the same value: f_n in [1, 2) if the value is at least
// 2^e_min, otherwise e_n = e_min (biased 0, the denormal representation) and
// f_n in [0, 1). On an enabled overflow trap (OVF_EN and OVF1) the exponent of
// the normalized factoring is lowered by alpha = 3*2^(N-2); on an enabled
// underflow trap (UNF_EN and TINY) the value is normalized with unbounded
// exponent range and the exponent is raised by alpha. Flags:
//   tiny = 0 < value < 2^e_min          (tiny-before-rounding)
//   ovf1 = value >= 2^(e_max+1)
// f_n has 1 integer and P+2 fraction bits and is the (P+1)-representative of
// the shifted significand: every bit shifted out to the right is ORed into the
// last position (a sticky bit), so the next box only merges two bits.
// The shifter is a leading-one detector plus one right shift of f_in placed
// P+2 positions to the left; the shift distance is the leading-one position
// plus the denormalization distance. Purely combinational.
// The box's function follows the source architecture; the shifter structure, the biased
// exponent encoding and the unbounded normalization on a trapped underflow are
// this design's reading of it.
module norm_shift
  import fpu_pkg::*;
#(
  parameter int unsigned N  = N_DEFAULT,
  parameter int unsigned P  = P_DEFAULT,
  parameter int unsigned FI = 2 * P - 2,   // fraction bits of f_in
  localparam int unsigned EW = N + 3       // signed internal exponent width
) (
  input  logic signed [EW-1:0] e_in,   // biased exponent of the input factoring
  input  logic        [FI+1:0] f_in,   // significand, 2 integer + FI fraction bits
  input  logic                 unf_en, // underflow trap enabled
  input  logic                 ovf_en, // overflow trap enabled
  output logic signed [EW-1:0] e_n,    // biased exponent e^n
  output logic        [P+2:0]  f_n,    // significand f^n, 1 integer + P+2 fraction bits
  output logic                 tiny,
  output logic                 ovf1
);

  localparam int unsigned FW = FI + 2;          // width of f_in
  localparam int unsigned BW = FW + P + 2;      // width of the shifter
  localparam int          ALPHA = alpha_of(N);
  localparam int          EMAXB = emax_biased(N);

  logic                   nz;
  logic [$clog2(FW)-1:0]  k;        // leading-one position in f_in
  logic signed [EW-1:0]   e_hat;    // biased exponent with unbounded range
  logic signed [EW:0]     dnorm;     // denormalization distance
  int unsigned            r;        // total right-shift distance
  logic [BW-1:0]          big, shifted, lost_mask;
  logic                   sticky;

  always_comb begin
    k  = '0;
    nz = |f_in;
    for (int i = 0; i < FW; i++)
      if (f_in[i]) k = i[$clog2(FW)-1:0];

    // value = f_in * 2^(e_in - bias - FI); its leading one weighs 2^(e_in + k - FI - bias)
    e_hat = e_in + EW'(signed'({1'b0, k})) - EW'(FI);
    tiny  = nz && (e_hat < 1);
    ovf1  = nz && (e_hat > EW'(EMAXB));

    dnorm = '0;
    if (tiny && !unf_en) dnorm = (EW+1)'(1) - (EW+1)'(e_hat);

    if (dnorm >= (EW+1)'(BW)) r = BW;
    else                     r = int'(k) + int'(dnorm);
    if (r > BW) r = BW;

    big       = BW'(f_in) << (P + 2);
    shifted   = (r >= BW) ? '0 : (big >> r);
    lost_mask = (r >= BW) ? '1 : ((BW'(1) << r) - BW'(1));
    sticky    = |(big & lost_mask);

    f_n    = shifted[P+2:0];
    f_n[0] = shifted[0] | sticky;

    if (!nz)                 e_n = '0;
    else if (ovf_en && ovf1) e_n = e_hat - EW'(ALPHA);
    else if (unf_en && tiny) e_n = e_hat + EW'(ALPHA);
    else if (tiny)           e_n = '0;
    else                     e_n = e_hat;
  end

endmodule
