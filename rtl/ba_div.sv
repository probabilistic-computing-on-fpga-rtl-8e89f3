// ba_div: Bayesian-algebra division of two odd ratios (single precision).
//
// A floating-point divider does the arithmetic. Division is taken as
// multiplication by the Bayesian inverse, a / b = a x b^-1, with the inverse
// of False (0) being True (infinity) and the inverse of True being False, and
// with False x True = False. This gives: x / True = False, False / x = False
// (so 0/0 and inf/inf are False), True / x = True for x not True, and
// x / False = True for x not False. Overflow gives True and underflow False.
// Signs are ignored and any exponent of all ones counts as True. How the
// quotient of two unusual odds is settled is this design's reading of the
// inverse and multiplication rules; the source design does not list it.
//
// The special case is decided when the operands enter and carried along a
// register chain of the divider's latency: result is valid LATENCY enabled
// cycles (6 by default) after dataa/datab, and a new pair can enter each
// cycle. Ports: dataa (dividend), datab (divisor), clock, clk_en, result.
module ba_div
  import ba_pkg::*;
#(
  parameter int unsigned LATENCY = 6
) (
  input  logic   clock,
  input  logic   clk_en,
  input  float_t dataa,
  input  float_t datab,
  output float_t result
);

  float_t div_module;

  fp_div #(.LATENCY(LATENCY)) u_div (
    .clock, .clk_en,
    .dataa(odds_abs(dataa)), .datab(odds_abs(datab)),
    .result(div_module)
  );

  typedef enum logic [1:0] {SP_NONE, SP_ZERO, SP_INF} special_t;

  special_t special_c;
  special_t special_q [LATENCY];

  always_comb begin
    if (odds_kind(datab) == ODDS_T || odds_kind(dataa) == ODDS_F)      special_c = SP_ZERO;
    else if (odds_kind(dataa) == ODDS_T || odds_kind(datab) == ODDS_F) special_c = SP_INF;
    else                                                               special_c = SP_NONE;
  end

  always_ff @(posedge clock) begin
    if (clk_en) begin
      special_q[0] <= special_c;
      for (int i = 1; i < LATENCY; i++) special_q[i] <= special_q[i-1];
    end
  end

  always_comb begin
    unique case (special_q[LATENCY-1])
      SP_ZERO: result = FP_ZERO;
      SP_INF:  result = FP_INF;
      default: result = div_module;
    endcase
  end

endmodule
