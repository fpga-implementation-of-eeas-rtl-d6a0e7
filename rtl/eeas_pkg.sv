// eeas_pkg: types, default sizes and elaboration-time table functions shared by
// the EEAS (extended elementary angle set) CORDIC sine/cosine generator.
//
// An elementary angle of the extended set is atan(t) with
//   t = 2^-s0 + op * 2^-s1,   op in {none, +1, -1},  0 <= s0 < s1 < NSHIFT,
// that is, the tangent of every micro-rotation is built from one or two signed
// powers of two. The direction of the rotation (the common sign of both terms)
// is chosen separately from the sign of the residual angle. A special "zero"
// element (no rotation at all) is also part of the set, so an iteration may be
// skipped when no element brings the residual angle closer to zero.
//
// Elements are numbered 0 .. num_elems(NSHIFT)-1:
//   0                          the zero element
//   1 .. NSHIFT                single term 2^-s0
//   then, for each s0 < s1:    2^-s0 + 2^-s1, then 2^-s0 - 2^-s1
//
// The angle and scale-factor tables are computed from these definitions with
// real arithmetic at elaboration time; nothing here is evaluated at run time.
// Fixed-point values are two's complement with FRAC fractional bits.
package eeas_pkg;

  // Word width of the angle input and the sine/cosine outputs (24 bits, as in
  // the reference simulation of the generator).
  localparam int unsigned W_DEF      = 24;
  // Fractional bits: 1/K = 0.607253 appears as 0x26DD3B, i.e. 22 fraction bits.
  localparam int unsigned FRAC_DEF   = 22;
  // Number of distinct shift amounts s = 0 .. NSHIFT-1 (one per fraction bit).
  localparam int unsigned NSHIFT_DEF = 22;
  // Maximum (fixed) iteration number Rm.
  localparam int unsigned RM_DEF     = 15;
  // Guard bits carried by the internal x/y/z datapath above W.
  localparam int unsigned GUARD_DEF  = 2;

  typedef enum logic [1:0] {
    TERM_NONE = 2'd0,   // single signed power of two
    TERM_ADD  = 2'd1,   // 2^-s0 + 2^-s1
    TERM_SUB  = 2'd2    // 2^-s0 - 2^-s1
  } term_op_e;

  // One element of the extended elementary angle set.
  typedef struct packed {
    logic     active;   // 0: the zero element, no rotation
    logic [4:0] s0;     // first shift
    term_op_e op1;      // how the second term is combined
    logic [4:0] s1;     // second shift (meaningful when op1 != TERM_NONE)
  } elem_t;

  function automatic int unsigned num_elems(int unsigned nshift);
    return 1 + nshift + nshift * (nshift - 1);
  endfunction

  // Decode an element index into its shifts and combination.
  function automatic elem_t elem_of(int unsigned k, int unsigned nshift);
    elem_t e;
    int unsigned idx;
    e = '0;
    if (k == 0) return e;
    e.active = 1'b1;
    if (k <= nshift) begin
      e.s0  = 5'(k - 1);
      e.op1 = TERM_NONE;
      return e;
    end
    idx = k - 1 - nshift;
    for (int unsigned a = 0; a < nshift; a++) begin
      for (int unsigned b = a + 1; b < nshift; b++) begin
        if (idx == 0) begin
          e.s0 = 5'(a); e.s1 = 5'(b); e.op1 = TERM_ADD;  return e;
        end
        if (idx == 1) begin
          e.s0 = 5'(a); e.s1 = 5'(b); e.op1 = TERM_SUB;  return e;
        end
        idx -= 2;
      end
    end
    return e;
  endfunction

  // Tangent t of an element (always >= 0).
  function automatic real elem_tan(elem_t e);
    real t;
    if (!e.active) return 0.0;
    t = 1.0 / (2.0 ** e.s0);
    case (e.op1)
      TERM_ADD: t = t + 1.0 / (2.0 ** e.s1);
      TERM_SUB: t = t - 1.0 / (2.0 ** e.s1);
      default:  ;
    endcase
    return t;
  endfunction

  // atan(t) in radians, rounded to FRAC fractional bits.
  function automatic longint elem_angle_q(elem_t e, int unsigned frac);
    return longint'($atan(elem_tan(e)) * (2.0 ** frac));   // cast rounds to nearest
  endfunction

  // Per-iteration scale factor cos(atan(t)) = 1/sqrt(1+t^2), FRAC fraction bits.
  function automatic longint elem_cos_q(elem_t e, int unsigned frac);
    real t;
    t = elem_tan(e);
    return longint'((2.0 ** frac) / $sqrt(1.0 + t * t));
  endfunction

endpackage
