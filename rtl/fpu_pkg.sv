// fpu_pkg: types and format helpers shared by the floating point unit.
//
// A binary floating point format is fixed by two numbers: N, the length of the
// exponent field, and P, the precision of the significand including the hidden
// bit. Every module of the unit takes N and P as parameters; their defaults here
// select IEEE double precision (N = 11, P = 53). The design itself is generic.
//
// Exponents travel between the blocks as signed integers in biased form
// (value + bias) that may leave the field range during computation. The biased
// value 0 is the "denormal representation" of e_min: a significand in [0, 1)
// that carries exponent e_min. Biased 1 is e_min with a normalized significand.
package fpu_pkg;

  localparam int unsigned N_DEFAULT = 11;  // exponent field length (double)
  localparam int unsigned P_DEFAULT = 53;  // significand precision incl. hidden bit

  // The four IEEE rounding directions.
  typedef enum logic [1:0] {
    RM_RNE = 2'd0,  // round to nearest, ties to even
    RM_RZ  = 2'd1,  // round toward zero
    RM_RPI = 2'd2,  // round toward +infinity
    RM_RMI = 2'd3   // round toward -infinity
  } round_mode_e;

  // Operation selected at the unit's top.
  typedef enum logic [1:0] {
    OP_ADD = 2'd0,
    OP_SUB = 2'd1,
    OP_MUL = 2'd2
  } fpu_op_e;

  // Exponent bias 2^(N-1) - 1.
  function automatic int bias_of(int n);
    return (1 << (n - 1)) - 1;
  endfunction

  // Largest biased exponent of a finite number: 2^N - 2.
  function automatic int emax_biased(int n);
    return (1 << n) - 2;
  endfunction

  // Exponent wrapping constant for trapped overflow/underflow: 3 * 2^(N-2).
  function automatic int alpha_of(int n);
    return 3 << (n - 2);
  endfunction

  // Does an overflowed result round to infinity (1) or to the largest finite
  // number (0)? Decided by the rounding direction and the sign.
  function automatic logic overflow_to_inf(round_mode_e rm, logic s);
    case (rm)
      RM_RNE:  return 1'b1;
      RM_RZ:   return 1'b0;
      RM_RPI:  return ~s;
      default: return s;
    endcase
  endfunction

endpackage
