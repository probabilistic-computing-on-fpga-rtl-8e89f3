// gut_controller: control unit of the floating-point Generic Bayesian Gate.
//
// The gate computes g(x,y,z) = (x+y+z) / (1 + x*y*z) on odd ratios, with 0
// meaning False and infinity meaning True. On 'ncs_start' the three inputs
// are latched (signs cleared) and sorted into False, True and finite numbers.
// Seven of the ten cases of the gate's truth table are resolved without
// arithmetic and finish in one cycle; the other three share a single adder,
// multiplier and divider in time:
//   F, y, z  ->  y + z                        (state CALC_ADD)
//   T, y, z  ->  1 / (y*z)                    (state CALC_DIV)
//   x, y, z  ->  ((x+y)+z) / ((x*y)*z + 1)    (state CALC_FUNC)
// In CALC_FUNC the adder and multiplier run side by side in the first two
// steps, then x*y*z + 1 is formed, then the quotient. If x*y*z + 1 overflows
// to infinity the result is 0, the limit of the gate function.
//
// Timing: each arithmetic step presents operands to a unit for its latency
// plus one cycle. Counting the cycles after the start cycle up to, not
// including, the cycle that asserts ncs_done gives 1 for the combinational
// cases and, with the default unit latencies (add 7, multiply 5, divide 6),
// 9 for F,y,z, 14 for T,y,z and 32 for x,y,z, the counts of the source
// design. ncs_done is high for the one cycle the FSM spends in DONE (longer
// only if ncs_clk_en is low), and a new ncs_start is taken in IDLE, from the
// cycle after done on. ncs_result
// holds its value until the next operation ends. ncs_clk_en low freezes the
// FSM (the arithmetic units share the same enable). ncs_reset is synchronous.
//
// The state names, the case split and the cycle counts follow the source
// design; the step-by-step schedule inside CALC_FUNC and the
// overflow rule are this design's choices.
module gut_controller
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
  output float_t ncs_result,
  // time-shared arithmetic units
  output float_t add_a,
  output float_t add_b,
  input  float_t add_r,
  output float_t mul_a,
  output float_t mul_b,
  input  float_t mul_r,
  output float_t div_a,
  output float_t div_b,
  input  float_t div_r
);

  typedef enum logic [2:0] {
    IDLE, START, CALC_DIV, CALC_ADD, CALC_FUNC, DONE
  } state_t;

  localparam int unsigned ADDMUL_CLOCKS = (ADD_CLOCKS > MULT_CLOCKS) ? ADD_CLOCKS : MULT_CLOCKS;

  state_t     state;
  float_t     in_r [3];
  float_t     v2_r;       // third finite operand, used in CALC_FUNC step 1
  float_t     sum_r;      // x+y+z, kept while x*y*z+1 is formed
  logic [1:0] step;
  logic [5:0] cnt;

  // Classification of the latched inputs (used in START).
  int unsigned n_f, n_t, n_v;
  float_t      v [3];     // finite inputs, packed to the front
  float_t      comb_res;

  always_comb begin
    n_f = 0; n_t = 0; n_v = 0;
    v[0] = FP_ZERO; v[1] = FP_ZERO; v[2] = FP_ZERO;
    for (int i = 0; i < 3; i++) begin
      unique case (odds_kind(in_r[i]))
        ODDS_F:  n_f++;
        ODDS_T:  n_t++;
        default: begin
          v[n_v[1:0]] = in_r[i];
          n_v++;
        end
      endcase
    end
    // Table of the cases that need no arithmetic
    if (n_v == 0)       comb_res = (n_t == 1 || n_t == 2) ? FP_INF : FP_ZERO;
    else if (n_f == 2)  comb_res = v[0];       // F, F, z -> z
    else if (n_f == 1)  comb_res = FP_INF;     // F, T, z -> T
    else                comb_res = FP_ZERO;    // T, T, z -> F
  end

  // Wait length of the current arithmetic step (cycles in the step minus one).
  logic [5:0] step_len;
  always_comb begin
    step_len = 6'(ADD_CLOCKS);
    unique case (state)
      CALC_DIV:  step_len = (step == 2'd0) ? 6'(MULT_CLOCKS) : 6'(DIV_CLOCKS);
      CALC_FUNC: step_len = (step <= 2'd1) ? 6'(ADDMUL_CLOCKS)
                          : (step == 2'd2) ? 6'(ADD_CLOCKS) : 6'(DIV_CLOCKS);
      default:   step_len = 6'(ADD_CLOCKS);
    endcase
  end

  always_ff @(posedge ncs_clk) begin
    if (ncs_reset) begin
      state      <= IDLE;
      ncs_result <= FP_ZERO;
      in_r[0] <= FP_ZERO; in_r[1] <= FP_ZERO; in_r[2] <= FP_ZERO;
      v2_r  <= FP_ZERO;
      sum_r <= FP_ZERO;
      step  <= '0;
      cnt   <= '0;
      add_a <= FP_ZERO; add_b <= FP_ZERO;
      mul_a <= FP_ZERO; mul_b <= FP_ZERO;
      div_a <= FP_ZERO; div_b <= FP_ZERO;
    end else if (ncs_clk_en) begin
      unique case (state)
        IDLE: if (ncs_start) begin
          in_r[0] <= odds_abs(x);
          in_r[1] <= odds_abs(y);
          in_r[2] <= odds_abs(z);
          state   <= START;
        end

        START: begin
          step <= '0;
          cnt  <= '0;
          if (n_v == 2 && n_f == 1) begin          // F, y, z
            add_a <= v[0]; add_b <= v[1];
            state <= CALC_ADD;
          end else if (n_v == 2 && n_t == 1) begin // T, y, z
            mul_a <= v[0]; mul_b <= v[1];
            state <= CALC_DIV;
          end else if (n_v == 3) begin             // x, y, z
            add_a <= v[0]; add_b <= v[1];
            mul_a <= v[0]; mul_b <= v[1];
            v2_r  <= v[2];
            state <= CALC_FUNC;
          end else begin
            ncs_result <= comb_res;
            state      <= DONE;
          end
        end

        CALC_ADD: begin
          cnt <= cnt + 6'd1;
          if (cnt == step_len) begin
            ncs_result <= add_r;
            state      <= DONE;
          end
        end

        CALC_DIV: begin
          cnt <= cnt + 6'd1;
          if (cnt == step_len) begin
            cnt <= '0;
            if (step == 2'd0) begin
              div_a <= FP_ONE;
              div_b <= mul_r;
              step  <= 2'd1;
            end else begin
              ncs_result <= div_r;
              state      <= DONE;
            end
          end
        end

        CALC_FUNC: begin
          cnt <= cnt + 6'd1;
          if (cnt == step_len) begin
            cnt  <= '0;
            step <= step + 2'd1;
            unique case (step)
              2'd0: begin                      // (x+y)+z and (x*y)*z
                add_a <= add_r; add_b <= v2_r;
                mul_a <= mul_r; mul_b <= v2_r;
              end
              2'd1: begin                      // x*y*z + 1
                sum_r <= add_r;
                add_a <= mul_r; add_b <= FP_ONE;
              end
              2'd2: begin                      // quotient
                div_a <= sum_r; div_b <= add_r;
              end
              default: begin
                ncs_result <= (odds_kind(div_b) == ODDS_T) ? FP_ZERO : div_r;
                state      <= DONE;
              end
            endcase
          end
        end

        DONE: state <= IDLE;

        default: state <= IDLE;
      endcase
    end
  end

  assign ncs_done = (state == DONE);

endmodule
