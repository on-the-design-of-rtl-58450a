// fp_ref_pkg: exact reference model for the testbenches.
//
// fp_ref#(N, P) rounds an exact value M * 2^E (M an unsigned integer of RW
// bits, E an integer) to the binary format with exponent length N and
// precision P, straight from the IEEE definitions: find the leading one, round
// to P bits with unbounded exponent range (this decides overflow), then either
// wrap the exponent by alpha = 3*2^(N-2) (trapped overflow or underflow),
// re-round on the denormal grid 2^(e_min - P + 1) (tiny results), saturate to
// infinity or the largest finite number (untrapped overflow) or keep the
// normal result. It also returns the overflow, underflow, inexact and tiny
// flags and whether a wrapped exponent fits the field (results outside it are
// not specified). Operand helpers build exact sums and products of IEEE
// strings. Written as plain loops over wide integers, independent of the RTL
// structure.
package fp_ref_pkg;
  import fpu_pkg::*;

  class fp_ref #(int N = 11, int P = 53);
    localparam int RW = (1 << N) + 2 * P + 8;
    localparam int W  = N + P;
    typedef logic [RW-1:0] big_t;

    typedef struct packed {
      logic [W-1:0] bits;
      logic ovf;
      logic unf;
      logic inx;
      logic tiny;
      logic valid;   // 0 when a wrapped exponent falls outside the field
    } res_t;

    // Round M >> sh to an integer in direction rm; sh may be <= 0 (exact).
    static function big_t rnd_shift(big_t m, int sh, logic s, round_mode_e rm,
                                    output logic inexact);
      big_t q;
      logic rb, st, inc;
      rb = 0; st = 0;
      if (sh <= 0) q = m << (-sh);
      else if (sh > RW) begin q = '0; st = (m != 0); end
      else begin
        q = m >> sh;
        rb = m[sh-1];
        for (int i = 0; i < sh - 1; i++) st |= m[i];
      end
      case (rm)
        RM_RNE:  inc = rb && (st || q[0]);
        RM_RZ:   inc = 0;
        RM_RPI:  inc = !s && (rb || st);
        default: inc = s && (rb || st);
      endcase
      inexact = rb | st;
      return q + big_t'(inc);
    endfunction

    static function res_t round(logic s, big_t m, int e, round_mode_e rm,
                                logic unf_en, logic ovf_en);
      res_t r;
      int bias, emin, emax, alpha, k, eh, er, fld;
      big_t q;
      logic inx;
      bias  = (1 << (N - 1)) - 1;
      emin  = 1 - bias;
      emax  = (1 << N) - 2 - bias;
      alpha = 3 << (N - 2);
      r = '0;
      r.valid = 1;
      if (m == 0) begin
        r.bits = {s, {(W-1){1'b0}}};
        return r;
      end
      k = 0;
      for (int i = 0; i < RW; i++) if (m[i]) k = i;
      eh = e + k;
      r.tiny = (eh < emin);
      q  = rnd_shift(m, k - (P - 1), s, rm, inx);
      er = eh;
      if (q[P]) begin q = q >> 1; er = eh + 1; end
      r.ovf = (er > emax);
      if (r.ovf && ovf_en) begin
        fld = er - alpha + bias;
        r.valid = (fld >= 1) && (fld <= (1 << N) - 2);
        r.bits = {s, fld[N-1:0], q[P-2:0]};
        r.inx = inx;
      end else if (r.tiny && unf_en) begin
        fld = er + alpha + bias;
        r.valid = (fld >= 1) && (fld <= (1 << N) - 2);
        r.bits = {s, fld[N-1:0], q[P-2:0]};
        r.inx = inx;
      end else if (r.tiny) begin
        q = rnd_shift(m, (emin - P + 1) - e, s, rm, inx);
        r.bits = {s, {(N-1){1'b0}}, q[P-1], q[P-2:0]};
        r.inx = inx;
      end else if (r.ovf) begin
        if (overflow_to_inf(rm, s)) r.bits = {s, {N{1'b1}}, {(P-1){1'b0}}};
        else                        r.bits = {s, {(N-1){1'b1}}, 1'b0, {(P-1){1'b1}}};
        r.inx = 1;
      end else begin
        fld = er + bias;
        r.bits = {s, fld[N-1:0], q[P-2:0]};
        r.inx = inx;
      end
      r.unf = unf_en ? r.tiny : (r.tiny && r.inx);
      return r;
    endfunction

    // Unpack an IEEE string: value = (-1)^s * m * 2^e, m an integer.
    static function void unpack(logic [W-1:0] x, output logic s, output big_t m,
                                output int e);
      int fld;
      s   = x[W-1];
      fld = int'(x[W-2:P-1]);
      m   = big_t'({fld != 0, x[P-2:0]});
      e   = ((fld == 0) ? 1 : fld) - ((1 << (N - 1)) - 1) - (P - 1);
    endfunction

    // Exact a + b (or a - b), then rounded. Exact zero: +0, or -0 toward -inf,
    // unless both addends are zeros of the same sign.
    static function res_t add(logic [W-1:0] a, logic [W-1:0] b, logic sub,
                              round_mode_e rm, logic unf_en, logic ovf_en);
      logic sa, sb, s;
      big_t ma, mb, m;
      int ea, eb, e;
      unpack(a, sa, ma, ea);
      unpack(b, sb, mb, eb);
      sb ^= sub;
      e  = (ea < eb) ? ea : eb;
      ma = ma << (ea - e);
      mb = mb << (eb - e);
      if (sa == sb) begin m = ma + mb; s = sa; end
      else if (ma >= mb) begin m = ma - mb; s = sa; end
      else begin m = mb - ma; s = sb; end
      if (m == 0 && sa != sb) s = (rm == RM_RMI);
      return round(s, m, e, rm, unf_en, ovf_en);
    endfunction

    static function res_t mul(logic [W-1:0] a, logic [W-1:0] b,
                              round_mode_e rm, logic unf_en, logic ovf_en);
      logic sa, sb;
      big_t ma, mb;
      int ea, eb;
      unpack(a, sa, ma, ea);
      unpack(b, sb, mb, eb);
      return round(sa ^ sb, ma * mb, ea + eb, rm, unf_en, ovf_en);
    endfunction
  endclass

endpackage
