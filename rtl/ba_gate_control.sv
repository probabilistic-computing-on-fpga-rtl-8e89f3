// ba_gate_control: controller of the Bayesian-algebra ALU custom instruction.
//
// On ncs_start it takes the operation index ncs_n (0 add, 1 multiply,
// 2 divide; 3 is unused and answers 0 at once), waits the fixed latency of
// the selected operator (ADD_CLOCKS, MULT_CLOCKS, DIV_CLOCKS enabled cycles),
// registers that operator's result and raises ncs_done for one cycle with
// ncs_result. The three operators see the custom-instruction operands
// directly, so only one operation is in flight at a time, as on a processor
// ALU. Timing: ncs_done comes LATENCY+1 enabled cycles after the start cycle
// (8 for add, 6 for multiply, 7 for divide). ncs_clk_en low freezes the
// controller; ncs_reset is synchronous.
//
// The port names, the index selection and the latency parameters follow the
// source design; the encoding of ncs_n and the handling of index 3 are this
// design's choices.
module ba_gate_control
  import ba_pkg::*;
#(
  parameter int unsigned DATA_SIZE   = 32,
  parameter int unsigned ADD_CLOCKS  = 7,
  parameter int unsigned MULT_CLOCKS = 5,
  parameter int unsigned DIV_CLOCKS  = 6
) (
  input  logic                 ncs_clk,
  input  logic                 ncs_clk_en,
  input  logic                 ncs_reset,
  input  logic                 ncs_start,
  input  logic [1:0]           ncs_n,
  input  logic [DATA_SIZE-1:0] add,
  input  logic [DATA_SIZE-1:0] mult,
  input  logic [DATA_SIZE-1:0] div,
  output logic                 ncs_done,
  output logic [DATA_SIZE-1:0] ncs_result
);

  typedef enum logic [1:0] {S_IDLE, S_WAIT, S_DONE} state_t;

  state_t     state;
  ba_op_t     op;
  logic [5:0] cnt;
  logic [5:0] wait_len;

  always_comb begin
    unique case (op)
      BA_OP_ADD:  wait_len = 6'(ADD_CLOCKS - 1);
      BA_OP_MULT: wait_len = 6'(MULT_CLOCKS - 1);
      BA_OP_DIV:  wait_len = 6'(DIV_CLOCKS - 1);
      default:    wait_len = 6'd0;
    endcase
  end

  always_ff @(posedge ncs_clk) begin
    if (ncs_reset) begin
      state      <= S_IDLE;
      op         <= BA_OP_ADD;
      cnt        <= '0;
      ncs_result <= '0;
    end else if (ncs_clk_en) begin
      unique case (state)
        S_IDLE: if (ncs_start) begin
          op  <= ba_op_t'(ncs_n);
          cnt <= '0;
          if (ba_op_t'(ncs_n) == BA_OP_NONE) begin
            ncs_result <= '0;
            state      <= S_DONE;
          end else begin
            state <= S_WAIT;
          end
        end
        S_WAIT: begin
          cnt <= cnt + 6'd1;
          if (cnt == wait_len) begin
            unique case (op)
              BA_OP_ADD:  ncs_result <= add;
              BA_OP_MULT: ncs_result <= mult;
              default:    ncs_result <= div;
            endcase
            state <= S_DONE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign ncs_done = (state == S_DONE);

endmodule
