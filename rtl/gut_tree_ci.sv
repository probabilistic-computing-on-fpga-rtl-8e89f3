// gut_tree_ci: static GUT tree as a Nios II custom instruction with direct
// memory access.
//
// The processor stores the 3^LAYERS tree inputs in memory (first-layer gate 1
// takes words 0..2, gate 2 words 3..5, and so on) and issues the instruction
// with their byte address in ncs_dataa. The DMA controller reads all of them
// in one Avalon-MM burst and starts each first-layer gate as soon as its three
// words have arrived (gut_select/gut_start), so the first gates compute while
// the rest of the burst is still coming. The tree's output is returned in
// ncs_result with ncs_done. As in gut_ci, the tree runs with its clock enable
// held high and ncs_clk_en qualifies only the handshake. LAYERS is 2 by
// default (9 inputs, 4 gates); 3 gives the 13-gate tree.
// Address bits [1:0] and the burst length are constant outputs by design
// (word-aligned reads of 3^LAYERS words).
module gut_tree_ci
  import ba_pkg::*;
#(
  parameter  int unsigned LAYERS   = 2,
  localparam int unsigned N_GROUPS = pow3(LAYERS - 1),
  localparam int unsigned BC_W     = $clog2(3 * N_GROUPS + 1)
) (
  input  logic            ncs_clk,
  input  logic            ncs_reset,
  input  logic            ncs_clk_en,
  input  logic            ncs_start,
  input  logic [31:0]     ncs_dataa,
  output logic            ncs_done,
  output float_t          ncs_result,
  // Avalon-MM burst read master
  output logic [31:0]     avm_address,
  output logic            avm_read,
  output logic [BC_W-1:0] avm_burstcount,
  input  logic            avm_waitrequest,
  input  logic [31:0]     avm_readdata,
  input  logic            avm_readdatavalid
);

  float_t     dataX, dataY, dataZ, acc_result;
  logic [7:0] gut_select;
  logic       gut_start, acc_done;

  dma_controller #(.N_GROUPS(N_GROUPS)) u_dma (.*);

  gut_tree_static #(.LAYERS(LAYERS)) u_tree (
    .ncs_clk, .ncs_reset,
    .ncs_clk_en(1'b1),
    .dataX, .dataY, .dataZ, .gut_select, .gut_start,
    .ncs_done  (acc_done),
    .ncs_result(acc_result)
  );

endmodule
