// ba_add: Bayesian-algebra addition of two odd ratios (single precision).
//
// A floating-point adder does the arithmetic; a small controller beside it
// applies the rules of Bayesian algebra for the unusual odds: anything plus
// True (infinity) is True, False (0) plus x is x, and an overflowing sum is
// True. Signs are ignored (odd ratios are not negative) and any exponent of
// all ones counts as True, so NaN patterns never come out.
//
// The special case is decided from the operands when they enter and carried
// along a register chain of the adder's latency, so the unit is a clean
// pipeline: result is valid LATENCY enabled cycles (7 by default) after
// dataa/datab, for every input, and a new pair can enter each cycle.
// Ports follow the source design's operator symbol: dataa, datab, clock,
// clk_en, result. Carrying the special case through a delay chain (rather
// than reading the live inputs at the output) is this design's choice.
module ba_add
  import ba_pkg::*;
#(
  parameter int unsigned LATENCY = 7
) (
  input  logic   clock,
  input  logic   clk_en,
  input  float_t dataa,
  input  float_t datab,
  output float_t result
);

  float_t add_module;
  logic   overflow, zero;

  fp_add #(.LATENCY(LATENCY)) u_add (
    .clock, .clk_en,
    .dataa(odds_abs(dataa)), .datab(odds_abs(datab)),
    .result(add_module), .overflow, .zero
  );

  // special-case flag travelling with the operands
  logic special_c;
  logic special_q [LATENCY];

  assign special_c = (odds_kind(dataa) == ODDS_T) || (odds_kind(datab) == ODDS_T);

  always_ff @(posedge clock) begin
    if (clk_en) begin
      special_q[0] <= special_c;
      for (int i = 1; i < LATENCY; i++) special_q[i] <= special_q[i-1];
    end
  end

  always_comb begin
    if (special_q[LATENCY-1] || overflow) result = FP_INF;
    else if (zero)                        result = FP_ZERO;
    else                                  result = add_module;
  end

endmodule
