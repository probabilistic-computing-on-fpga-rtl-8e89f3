// bayes_top: the Bayesian-algebra accelerators side by side, each with the
// ports of a Nios II custom instruction (and, where it reads memory, of an
// Avalon-MM burst read master), sharing one clock, reset and clock enable.
//
//   gut_*   one floating-point Generic Bayesian Gate; inputs fetched by DMA
//   tree_*  static GUT tree (2 layers, 9 inputs); inputs fetched by DMA
//   alu_*   Bayesian-algebra ALU: add (n=0), multiply (1), divide (2)
//   fix_*   16-bit fixed-point gate in probabilities, combinational; p in
//           fix_dataa[15:0], q in fix_dataa[31:16], r in fix_datab,
//           the gate output in fix_result
//   dyn_*   four-gate tree computing 1/((a+b)*(1/c+d))
//   bat_*   operator tree computing (in1+in2+in3)/(in3*in4)
//
// The processor and the memory are outside: their signals are the ports.
// Each unit works as described in its own file; nothing here but wiring
// and the operand packing of the fixed-point gate (this design's choice).
//
// Six output bits are constant by design: bits [1:0] of both Avalon addresses
// (reads are word aligned) and the single-gate burst length, always 3.
module bayes_top
  import ba_pkg::*;
#(
  parameter int unsigned TREE_LAYERS = 2,
  localparam int unsigned TREE_BC_W  = $clog2(pow3(TREE_LAYERS) + 1)
) (
  input  logic                 clk,
  input  logic                 reset,
  input  logic                 clk_en,
  // single gate with DMA
  input  logic                 gut_start,
  input  logic [31:0]          gut_dataa,
  output logic                 gut_done,
  output float_t               gut_result,
  output logic [31:0]          gut_avm_address,
  output logic                 gut_avm_read,
  output logic [1:0]           gut_avm_burstcount,
  input  logic                 gut_avm_waitrequest,
  input  logic [31:0]          gut_avm_readdata,
  input  logic                 gut_avm_readdatavalid,
  // static GUT tree with DMA
  input  logic                 tree_start,
  input  logic [31:0]          tree_dataa,
  output logic                 tree_done,
  output float_t               tree_result,
  output logic [31:0]          tree_avm_address,
  output logic                 tree_avm_read,
  output logic [TREE_BC_W-1:0] tree_avm_burstcount,
  input  logic                 tree_avm_waitrequest,
  input  logic [31:0]          tree_avm_readdata,
  input  logic                 tree_avm_readdatavalid,
  // Bayesian-algebra ALU
  input  logic                 alu_start,
  input  logic [1:0]           alu_n,
  input  float_t               alu_dataa,
  input  float_t               alu_datab,
  output logic                 alu_done,
  output float_t               alu_result,
  // fixed-point gate (combinational custom instruction)
  input  logic [31:0]          fix_dataa,
  input  logic [15:0]          fix_datab,
  output logic [15:0]          fix_result,
  // dynamically generated GUT tree
  input  logic                 dyn_start,
  input  float_t               dyn_a,
  input  float_t               dyn_b,
  input  float_t               dyn_c,
  input  float_t               dyn_d,
  output logic                 dyn_done,
  output float_t               dyn_result,
  // Bayesian-algebra operator tree
  input  float_t               bat_input1,
  input  float_t               bat_input2,
  input  float_t               bat_input3,
  input  float_t               bat_input4,
  output float_t               bat_result
);

  gut_ci u_gut_ci (
    .ncs_clk(clk), .ncs_reset(reset), .ncs_clk_en(clk_en),
    .ncs_start(gut_start), .ncs_dataa(gut_dataa),
    .ncs_done(gut_done), .ncs_result(gut_result),
    .avm_address(gut_avm_address), .avm_read(gut_avm_read),
    .avm_burstcount(gut_avm_burstcount), .avm_waitrequest(gut_avm_waitrequest),
    .avm_readdata(gut_avm_readdata), .avm_readdatavalid(gut_avm_readdatavalid)
  );

  gut_tree_ci #(.LAYERS(TREE_LAYERS)) u_tree_ci (
    .ncs_clk(clk), .ncs_reset(reset), .ncs_clk_en(clk_en),
    .ncs_start(tree_start), .ncs_dataa(tree_dataa),
    .ncs_done(tree_done), .ncs_result(tree_result),
    .avm_address(tree_avm_address), .avm_read(tree_avm_read),
    .avm_burstcount(tree_avm_burstcount), .avm_waitrequest(tree_avm_waitrequest),
    .avm_readdata(tree_avm_readdata), .avm_readdatavalid(tree_avm_readdatavalid)
  );

  ba_alu_ci u_alu_ci (
    .ncs_clk(clk), .ncs_clk_en(clk_en), .ncs_reset(reset),
    .ncs_start(alu_start), .ncs_n(alu_n),
    .ncs_dataa(alu_dataa), .ncs_datab(alu_datab),
    .ncs_done(alu_done), .ncs_result(alu_result)
  );

  gut_fixed u_gut_fixed (
    .pp(fix_dataa[15:0]), .qq(fix_dataa[31:16]), .rr(fix_datab),
    .frac(fix_result)
  );

  gut_tree_dyn u_tree_dyn (
    .ncs_clk(clk), .ncs_reset(reset), .ncs_clk_en(clk_en),
    .ncs_start(dyn_start), .a(dyn_a), .b(dyn_b), .c(dyn_c), .d(dyn_d),
    .ncs_done(dyn_done), .ncs_result(dyn_result)
  );

  ba_tree u_ba_tree (
    .clock(clk), .clock_enable(clk_en),
    .input1(bat_input1), .input2(bat_input2), .input3(bat_input3), .input4(bat_input4),
    .result(bat_result)
  );

endmodule
