// gut_ci: a single floating-point Generic Bayesian Gate as a Nios II
// custom instruction with direct memory access.
//
// The processor stores the three gate inputs (single-precision odd ratios,
// X at the lowest address) in memory and issues the instruction with their
// byte address in ncs_dataa. The DMA controller fetches the three words in
// one Avalon-MM burst, starts the gate, and returns the gate output in
// ncs_result with ncs_done. The gate runs continuously (its clock enable is
// held high) so that it cannot miss the start pulse from the DMA side while
// the processor's clock enable is low; ncs_clk_en qualifies only the
// custom-instruction handshake. Timing: ncs_done follows ncs_start after the
// memory read (burst of 3), about three cycles of hand-over and the gate
// time of 1 to 32 cycles. Structure (processor, DMA controller, gate
// controller with add, multiply and divide units, memory) follows the
// source design.
//
// gut_select from the DMA controller is left unconnected on purpose: with one
// gate there is nothing to select, and gut_start alone starts the gate.
module gut_ci
  import ba_pkg::*;
#(
  parameter int unsigned ADD_CLOCKS  = 7,
  parameter int unsigned MULT_CLOCKS = 5,
  parameter int unsigned DIV_CLOCKS  = 6
) (
  input  logic        ncs_clk,
  input  logic        ncs_reset,
  input  logic        ncs_clk_en,
  input  logic        ncs_start,
  input  logic [31:0] ncs_dataa,
  output logic        ncs_done,
  output float_t      ncs_result,
  // Avalon-MM burst read master
  output logic [31:0] avm_address,
  output logic        avm_read,
  output logic [1:0]  avm_burstcount,
  input  logic        avm_waitrequest,
  input  logic [31:0] avm_readdata,
  input  logic        avm_readdatavalid
);

  float_t     dataX, dataY, dataZ, acc_result;
  logic [7:0] gut_select;
  logic       gut_start, acc_done;

  dma_controller #(.N_GROUPS(1)) u_dma (.*);

  gut_fp #(
    .ADD_CLOCKS (ADD_CLOCKS),
    .MULT_CLOCKS(MULT_CLOCKS),
    .DIV_CLOCKS (DIV_CLOCKS)
  ) u_gut (
    .ncs_clk, .ncs_reset,
    .ncs_clk_en(1'b1),
    .ncs_start (gut_start),
    .x(dataX), .y(dataY), .z(dataZ),
    .ncs_done  (acc_done),
    .ncs_result(acc_result)
  );

endmodule
