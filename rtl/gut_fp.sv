// gut_fp: floating-point Generic Bayesian Gate (GUT).
//
// Computes g(x,y,z) = (x+y+z)/(1+x*y*z) on single-precision odd ratios, with
// the False (0) and True (infinity) cases of the gate's truth table resolved
// without arithmetic. It is the gate controller (gut_controller) plus one
// adder, one multiplier and one divider that the controller reuses in time.
//
// Interface (names of a Nios II multi-cycle custom instruction): pulse
// ncs_start for one cycle with x, y, z valid; ncs_done rises 1 to 32 cycles
// later (see gut_controller) with ncs_result valid, and the result is held
// afterwards. ncs_clk_en low freezes the gate. ncs_reset is synchronous.
//
// The adder's overflow and zero flags are not needed by the gate controller
// (it classifies the sum itself) and are left unconnected.
module gut_fp
  import ba_pkg::*;
#(
  parameter int unsigned ADD_CLOCKS  = 7,
  parameter int unsigned MULT_CLOCKS = 5,
  parameter int unsigned DIV_CLOCKS  = 6
) (
  input  logic   ncs_clk,
  input  logic   ncs_reset,
  input  logic   ncs_clk_en,
  input  logic   ncs_start,
  input  float_t x,
  input  float_t y,
  input  float_t z,
  output logic   ncs_done,
  output float_t ncs_result
);

  float_t add_a, add_b, add_r, mul_a, mul_b, mul_r, div_a, div_b, div_r;
  logic   add_ovf, add_zero;

  gut_controller #(
    .ADD_CLOCKS (ADD_CLOCKS),
    .MULT_CLOCKS(MULT_CLOCKS),
    .DIV_CLOCKS (DIV_CLOCKS)
  ) u_ctrl (.*);

  fp_add #(.LATENCY(ADD_CLOCKS)) u_add (
    .clock(ncs_clk), .clk_en(ncs_clk_en), .dataa(add_a), .datab(add_b),
    .result(add_r), .overflow(add_ovf), .zero(add_zero)
  );

  fp_mult #(.LATENCY(MULT_CLOCKS)) u_mult (
    .clock(ncs_clk), .clk_en(ncs_clk_en), .dataa(mul_a), .datab(mul_b),
    .result(mul_r)
  );

  fp_div #(.LATENCY(DIV_CLOCKS)) u_div (
    .clock(ncs_clk), .clk_en(ncs_clk_en), .dataa(div_a), .datab(div_b),
    .result(div_r)
  );

endmodule
