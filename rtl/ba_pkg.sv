// ba_pkg: types, constants and helper functions shared by the Bayesian-algebra
// accelerators.
//
// Values are odd ratios r = P(B=1)/P(B=0) held as IEEE-754 single-precision
// numbers. Bayesian algebra gives two "unusual" odds a logical meaning: 0 is
// False (F) and +infinity is True (T); 1.0 is the uniform value U.
//
// Classification follows the software reference of the gate: a word whose
// exponent field is all ones counts as True (this includes NaN patterns), a
// word whose exponent field is zero counts as False (zero and denormals, which
// the arithmetic flushes to zero), anything else is a finite positive number.
// Sign bits are ignored: odd ratios are never negative, so every block clears
// the sign of its inputs.
// FP_NAN is provided for users of the package; the classifying functions
// read only the exponent field of their argument.
package ba_pkg;

  typedef logic [31:0] float_t;

  localparam float_t FP_ZERO = 32'h0000_0000;  // False
  localparam float_t FP_ONE  = 32'h3F80_0000;  // Uniform
  localparam float_t FP_INF  = 32'h7F80_0000;  // True
  localparam float_t FP_NAN  = 32'h7FC0_0000;  // IEEE invalid result

  // Kind of an odd ratio as the gate truth table sees it.
  typedef enum logic [1:0] {
    ODDS_F   = 2'd0,  // 0
    ODDS_T   = 2'd1,  // infinity
    ODDS_NUM = 2'd2   // finite positive number
  } odds_kind_t;

  function automatic odds_kind_t odds_kind(float_t v);
    if (v[30:23] == 8'hFF) return ODDS_T;
    if (v[30:23] == 8'h00) return ODDS_F;
    return ODDS_NUM;
  endfunction

  function automatic float_t odds_abs(float_t v);
    return {1'b0, v[30:0]};
  endfunction

  // Powers of three, used to size ternary trees.
  function automatic int pow3(int n);
    int r = 1;
    for (int i = 0; i < n; i++) r = r * 3;
    return r;
  endfunction

  // Operation codes of the Bayesian-algebra ALU (custom instruction n field).
  typedef enum logic [1:0] {
    BA_OP_ADD  = 2'd0,
    BA_OP_MULT = 2'd1,
    BA_OP_DIV  = 2'd2,
    BA_OP_NONE = 2'd3
  } ba_op_t;

endpackage
