// ba_alu_ci: Bayesian-algebra ALU as a Nios II multi-cycle custom instruction.
//
// An alternative arithmetic unit for a small processor: the Bayesian-algebra
// adder, multiplier and divider all receive the two custom-instruction
// operands, and the gate controller selects one of them with the ncs_n index
// (0 add, 1 multiply, 2 divide), waits its latency and returns its result
// with ncs_done. Needs no memory access: both operands travel in the
// instruction. Timing: pulse ncs_start with ncs_n, ncs_dataa, ncs_datab valid
// and keep the operands until ncs_done, which rises 8 (add), 6 (multiply) or
// 7 (divide) cycles after the start cycle. The block structure and the
// latency parameters follow the source design.
module ba_alu_ci
  import ba_pkg::*;
#(
  parameter int unsigned DATA_SIZE   = 32,
  parameter int unsigned ADD_CLOCKS  = 7,
  parameter int unsigned MULT_CLOCKS = 5,
  parameter int unsigned DIV_CLOCKS  = 6
) (
  input  logic        ncs_clk,
  input  logic        ncs_clk_en,
  input  logic        ncs_reset,
  input  logic        ncs_start,
  input  logic [1:0]  ncs_n,
  input  float_t      ncs_dataa,
  input  float_t      ncs_datab,
  output logic        ncs_done,
  output float_t      ncs_result
);

  float_t add_r, mult_r, div_r;

  ba_add #(.LATENCY(ADD_CLOCKS)) u_add (
    .clock(ncs_clk), .clk_en(ncs_clk_en), .dataa(ncs_dataa), .datab(ncs_datab), .result(add_r)
  );

  ba_mult #(.LATENCY(MULT_CLOCKS)) u_mult (
    .clock(ncs_clk), .clk_en(ncs_clk_en), .dataa(ncs_dataa), .datab(ncs_datab), .result(mult_r)
  );

  ba_div #(.LATENCY(DIV_CLOCKS)) u_div (
    .clock(ncs_clk), .clk_en(ncs_clk_en), .dataa(ncs_dataa), .datab(ncs_datab), .result(div_r)
  );

  ba_gate_control #(
    .DATA_SIZE  (DATA_SIZE),
    .ADD_CLOCKS (ADD_CLOCKS),
    .MULT_CLOCKS(MULT_CLOCKS),
    .DIV_CLOCKS (DIV_CLOCKS)
  ) u_ctrl (
    .ncs_clk, .ncs_clk_en, .ncs_reset, .ncs_start, .ncs_n,
    .add(add_r), .mult(mult_r), .div(div_r),
    .ncs_done, .ncs_result
  );

endmodule
