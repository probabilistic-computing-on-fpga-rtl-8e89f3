// dma_controller: custom-instruction front end with direct memory access.
//
// A Nios II custom instruction carries at most two 32-bit operands, too few
// for a three-input gate or a tree of gates. This controller takes the byte
// address of the input array in ncs_dataa, reads 3*N_GROUPS consecutive
// 32-bit words from memory with one Avalon-MM burst read, and hands them to
// the accelerator three at a time: when the third word of group g has
// arrived it drives dataX/dataY/dataZ with that group and pulses gut_start
// for one cycle with gut_select = g+1 (select values start at 1, as the
// outputs eq1, eq2, eq3 of the select decoder do). Gates are therefore
// started as soon as their inputs exist, while the rest of the burst is
// still arriving. When the last group has been handed over the controller
// waits for acc_done, registers acc_result and answers the processor with
// ncs_done and ncs_result.
//
// Interfaces:
//  - custom instruction (multi-cycle): ncs_start, ncs_dataa, ncs_done,
//    ncs_result, ncs_clk_en, ncs_reset (synchronous). ncs_clk_en only
//    qualifies the handshake: a start is taken, and the done cycle is
//    left, on enabled cycles; the bus side and the accelerator keep running,
//    since a burst in flight cannot be paused.
//  - Avalon-MM burst read master: avm_address (byte address, held for the
//    burst; bits [1:0] of ncs_dataa are ignored, reads are word aligned),
//    avm_read, avm_burstcount, avm_waitrequest, avm_readdata,
//    avm_readdatavalid. read, address and burstcount are held while
//    waitrequest is high (checked by an assertion).
//  - accelerator: dataX, dataY, dataZ, gut_select, gut_start, acc_done,
//    acc_result.
// Timing: with a memory that returns data d cycles after the request is
// accepted, the first gate starts about d+3 cycles after ncs_start.
//
// The use of an Avalon-MM burst master, the loading of each gate as soon as
// three inputs are available and the gut_select/gut_start signals follow the
// source design; the operand convention (address in ncs_dataa), the single
// burst and the handshake details are this design's choices.
module dma_controller
  import ba_pkg::*;
#(
  parameter int unsigned N_GROUPS = 1,                         // gates fed from memory
  parameter int unsigned N_WORDS  = 3 * N_GROUPS,
  parameter int unsigned BC_W     = $clog2(N_WORDS + 1)        // burstcount width
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
  input  logic            avm_readdatavalid,
  // accelerator side
  output float_t          dataX,
  output float_t          dataY,
  output float_t          dataZ,
  output logic [7:0]      gut_select,
  output logic            gut_start,
  input  logic            acc_done,
  input  float_t          acc_result
);

  typedef enum logic [2:0] {S_IDLE, S_REQ, S_RECV, S_WAIT, S_DONE} state_t;

  state_t        state;
  logic [1:0]    word_in_group;
  logic [7:0]    group;
  float_t        w0, w1;          // first two words of the group being received

  always_ff @(posedge ncs_clk) begin
    if (ncs_reset) begin
      state          <= S_IDLE;
      avm_address    <= '0;
      avm_read       <= 1'b0;
      avm_burstcount <= '0;
      word_in_group  <= '0;
      group          <= '0;
      w0 <= FP_ZERO; w1 <= FP_ZERO;
      dataX <= FP_ZERO; dataY <= FP_ZERO; dataZ <= FP_ZERO;
      gut_select     <= '0;
      gut_start      <= 1'b0;
      ncs_result     <= FP_ZERO;
    end else begin
      gut_start <= 1'b0;
      unique case (state)
        S_IDLE: if (ncs_clk_en && ncs_start) begin
          avm_address    <= {ncs_dataa[31:2], 2'b00};
          avm_read       <= 1'b1;
          avm_burstcount <= BC_W'(N_WORDS);
          word_in_group  <= '0;
          group          <= '0;
          state          <= S_REQ;
        end

        S_REQ: if (!avm_waitrequest) begin
          avm_read <= 1'b0;
          state    <= S_RECV;
        end

        S_RECV: if (avm_readdatavalid) begin
          unique case (word_in_group)
            2'd0:    begin w0 <= avm_readdata; word_in_group <= 2'd1; end
            2'd1:    begin w1 <= avm_readdata; word_in_group <= 2'd2; end
            default: begin
              dataX <= w0; dataY <= w1; dataZ <= avm_readdata;
              gut_select    <= group + 8'd1;
              gut_start     <= 1'b1;
              word_in_group <= 2'd0;
              group         <= group + 8'd1;
              if (group == 8'(N_GROUPS - 1)) state <= S_WAIT;
            end
          endcase
        end

        S_WAIT: if (acc_done) begin
          ncs_result <= acc_result;
          state      <= S_DONE;
        end

        S_DONE: if (ncs_clk_en) state <= S_IDLE;

        default: state <= S_IDLE;
      endcase
    end
  end

  assign ncs_done = (state == S_DONE);

  // Avalon-MM: a master holds its request while the slave asserts waitrequest.
  a_hold_request: assert property (@(posedge ncs_clk) disable iff (ncs_reset)
      avm_read && avm_waitrequest |=> avm_read && $stable(avm_address) && $stable(avm_burstcount));

endmodule
