// gut_tree_dyn: a dynamically generated GUT tree for one fixed function,
//     ncs_result = 1 / ((a + b) * (1/c + d))
//                = G(T, G(F, a, b), G(F, G(T, U, c), d)),
// built from four floating-point Generic Bayesian Gates whose unused inputs
// are tied to the constants False (0), True (infinity) and U (1.0). Feeding
// inputs and constants into any layer makes the tree smaller than a full
// static tree (4 gates instead of 13 for four inputs over three layers), at
// the price of computing only this function.
//
// Gates: g_inv = G(T,U,c) = 1/c and g_ab = G(F,a,b) = a+b start together on
// ncs_start; g_cd = G(F, 1/c, d) starts when g_inv is done; g_out =
// G(T, a+b, 1/c+d) starts when both g_ab and g_cd have reported done (their
// done pulses are kept in flags). d is registered at ncs_start, so a, b, c, d
// need only be valid in the start cycle. ncs_done pulses with ncs_result
// valid; for finite inputs that is 41 cycles after ncs_start. ncs_clk_en
// freezes the tree; ncs_reset is synchronous. The gate arrangement follows
// the source design; the start sequencing is this design's choice.
module gut_tree_dyn
  import ba_pkg::*;
(
  input  logic   ncs_clk,
  input  logic   ncs_reset,
  input  logic   ncs_clk_en,
  input  logic   ncs_start,
  input  float_t a,
  input  float_t b,
  input  float_t c,
  input  float_t d,
  output logic   ncs_done,
  output float_t ncs_result
);

  float_t d_r;
  float_t inv_r, ab_r, cd_r;
  logic   inv_done, ab_done, cd_done;
  logic   ab_seen, cd_seen;
  logic   out_start;

  always_ff @(posedge ncs_clk) begin
    if (ncs_reset) begin
      d_r     <= FP_ZERO;
      ab_seen <= 1'b0;
      cd_seen <= 1'b0;
    end else if (ncs_clk_en) begin
      if (ncs_start) d_r <= d;
      if (out_start) begin
        ab_seen <= 1'b0;
        cd_seen <= 1'b0;
      end else begin
        if (ab_done) ab_seen <= 1'b1;
        if (cd_done) cd_seen <= 1'b1;
      end
    end
  end

  assign out_start = ab_seen && cd_seen;

  gut_fp u_inv (
    .ncs_clk, .ncs_reset, .ncs_clk_en, .ncs_start(ncs_start),
    .x(FP_INF), .y(FP_ONE), .z(c),
    .ncs_done(inv_done), .ncs_result(inv_r)
  );

  gut_fp u_ab (
    .ncs_clk, .ncs_reset, .ncs_clk_en, .ncs_start(ncs_start),
    .x(FP_ZERO), .y(a), .z(b),
    .ncs_done(ab_done), .ncs_result(ab_r)
  );

  gut_fp u_cd (
    .ncs_clk, .ncs_reset, .ncs_clk_en, .ncs_start(inv_done),
    .x(FP_ZERO), .y(inv_r), .z(d_r),
    .ncs_done(cd_done), .ncs_result(cd_r)
  );

  gut_fp u_out (
    .ncs_clk, .ncs_reset, .ncs_clk_en, .ncs_start(out_start),
    .x(FP_INF), .y(ab_r), .z(cd_r),
    .ncs_done, .ncs_result
  );

endmodule
