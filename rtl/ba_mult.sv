// ba_mult: Bayesian-algebra multiplication of two odd ratios (single precision).
//
// A floating-point multiplier does the arithmetic; the special cases follow
// Bayesian algebra, the extension of Boolean AND: False (0) times anything,
// True (infinity) included, is False; True times a non-zero value is True.
// An overflowing product is True and an underflowing one False. Signs are
// ignored and any exponent of all ones counts as True.
//
// The special case is decided when the operands enter and carried along a
// register chain of the multiplier's latency: result is valid LATENCY enabled
// cycles (5 by default) after dataa/datab, and a new pair can enter each
// cycle. Ports: dataa, datab, clock, clk_en, result.
module ba_mult
  import ba_pkg::*;
#(
  parameter int unsigned LATENCY = 5
) (
  input  logic   clock,
  input  logic   clk_en,
  input  float_t dataa,
  input  float_t datab,
  output float_t result
);

  float_t mult_module;

  fp_mult #(.LATENCY(LATENCY)) u_mult (
    .clock, .clk_en,
    .dataa(odds_abs(dataa)), .datab(odds_abs(datab)),
    .result(mult_module)
  );

  typedef enum logic [1:0] {SP_NONE, SP_ZERO, SP_INF} special_t;

  special_t special_c;
  special_t special_q [LATENCY];

  always_comb begin
    if (odds_kind(dataa) == ODDS_F || odds_kind(datab) == ODDS_F)      special_c = SP_ZERO;
    else if (odds_kind(dataa) == ODDS_T || odds_kind(datab) == ODDS_T) special_c = SP_INF;
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
      default: result = mult_module;
    endcase
  end

endmodule
