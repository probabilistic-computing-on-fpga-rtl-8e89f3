// gut_fixed: combinational Generic Bayesian Gate in fixed point, working on
// probabilities instead of odd ratios.
//
// With p, q, r the probabilities that correspond to the odd ratios x, y, z,
// the gate g(x,y,z) = (x+y+z)/(1+xyz) becomes
//     g'(p,q,r) = (p+q+r - 2(pq+qr+pr) + 3pqr) / (1 - pq - qr - pr + 3pqr).
// Inputs and output are Q_SIZE-bit pure fractions (value = word / 2^Q_SIZE);
// the all-ones word stands for probability 1 (True). Intermediate values
// carry I_SIZE extra integer bits and Q_SIZE fraction bits: every product
// is rounded to nearest (ties up) back to Q_SIZE fraction bits, every
// intermediate saturates to [0, 2^I_SIZE), the quotient is formed with
// Q_SIZE + 8 fraction bits and rounded to Q_SIZE, and an output of 1 or
// more is returned as all ones. With the defaults (16 + 8 bits) this
// reproduces the published console outputs of the 16-bit gate, e.g.
// g'(0x7000, 0x5000, 0x0700) = 0x8E1F, including its precision loss
// (g'(1, 1, 0x0700) gives 0x0049 instead of 0).
//
// Purely combinational, no clock: as a custom instruction it is the
// combinational type, with p, q and r packed into the two 32-bit operands.
// The equation, the widths and the saturating output follow the source
// design; the rounding details are this design's reconstruction.
module gut_fixed #(
  parameter int unsigned Q_SIZE = 16,   // fraction bits
  parameter int unsigned I_SIZE = 8     // extra integer bits for the intermediates
) (
  input  logic [Q_SIZE-1:0] pp,
  input  logic [Q_SIZE-1:0] qq,
  input  logic [Q_SIZE-1:0] rr,
  output logic [Q_SIZE-1:0] frac
);

  localparam int unsigned W = I_SIZE + Q_SIZE;   // intermediate width
  localparam int unsigned D = 8;                 // extra quotient fraction bits

  typedef logic [W-1:0] fx_t;

  localparam fx_t FX_ONE = fx_t'(1) << Q_SIZE;
  localparam fx_t FX_MAX = {W{1'b1}};

  // clamp a wide non-negative or negative value into [0, FX_MAX]
  function automatic fx_t sat(logic signed [2*W+3:0] v);
    if (v < 0) return '0;
    if (v > $signed({{(W+4){1'b0}}, FX_MAX})) return FX_MAX;
    return fx_t'(v);
  endfunction

  // product of two fixed-point values, rounded to Q_SIZE fraction bits
  function automatic fx_t fx_mul(logic [2*W+3:0] a, logic [2*W+3:0] b);
    logic [2*W+3:0] prod;
    prod = a * b + ((2*W+4)'(1) << (Q_SIZE - 1));
    return sat($signed(prod >> Q_SIZE));
  endfunction

  fx_t p, q, r, pq, qr, pr, pqr3, psum, pair2, dividend, divisor, result;
  logic [W+D-1:0] quot;

  always_comb begin
    p = fx_t'(pp);
    q = fx_t'(qq);
    r = fx_t'(rr);
    pq    = fx_mul((2*W+4)'(p), (2*W+4)'(q));
    qr    = fx_mul((2*W+4)'(q), (2*W+4)'(r));
    pr    = fx_mul((2*W+4)'(p), (2*W+4)'(r));
    pqr3  = fx_mul((2*W+4)'(pq) * 3, (2*W+4)'(r));
    psum  = sat((2*W+4)'(p) + (2*W+4)'(q) + (2*W+4)'(r));
    pair2 = sat(((2*W+4)'(pq) + (2*W+4)'(qr) + (2*W+4)'(pr)) << 1);
    dividend = sat($signed((2*W+4)'(psum) + (2*W+4)'(pqr3) - (2*W+4)'(pair2)));
    divisor  = sat($signed((2*W+4)'(pqr3) + (2*W+4)'(FX_ONE) - (2*W+4)'(pq)
                           - (2*W+4)'(qr) - (2*W+4)'(pr)));
    if (divisor == '0) begin
      quot   = '1;
      result = FX_MAX;
    end else begin
      quot   = (W+D)'(({{D{1'b0}}, dividend, {(Q_SIZE+D){1'b0}}}) / {{(Q_SIZE+2*D){1'b0}}, divisor});
      result = sat($signed(((2*W+4)'(quot) + ((2*W+4)'(1) << (D - 1))) >> D));
    end
    frac = (result < FX_ONE) ? result[Q_SIZE-1:0] : {Q_SIZE{1'b1}};
  end

endmodule
