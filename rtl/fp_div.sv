// fp_div: pipelined IEEE-754 single-precision divider, dataa / datab.
//
// The quotient is formed in one combinational step from the operands sampled
// at the clock edge and delayed so that it appears LATENCY enabled clock edges
// after the operands are presented (6 by default, the divider latency used by
// the Bayesian-algebra ALU controller of the source design). One new pair of
// operands can be accepted every enabled cycle.
//
// Arithmetic (this design's choice): 50-bit by 24-bit mantissa division with
// the remainder folded into a sticky bit, round to nearest even, denormals
// flushed to zero, overflow to +/-infinity, x/0 = +/-infinity for x != 0,
// x/infinity = 0, and 0/0, infinity/infinity or a NaN operand give a quiet
// NaN (the Bayesian rules for those cases are applied in ba_div).
//
// Ports: clock, clk_en (freezes the pipeline when low), dataa, datab, result.
module fp_div #(
  parameter int unsigned LATENCY = 6
) (
  input  logic        clock,
  input  logic        clk_en,
  input  logic [31:0] dataa,
  input  logic [31:0] datab,
  output logic [31:0] result
);

  logic [31:0] quot_c;

  always_comb begin
    logic        s;
    logic [7:0]  ea, eb;
    logic [49:0] num;
    logic [26:0] q;
    logic [23:0] rem;
    logic [23:0] m;
    logic        g, st;
    logic [24:0] mr;
    logic [9:0]  e;
    logic        a_nan, b_nan, a_inf, b_inf, a_zero, b_zero;

    s  = dataa[31] ^ datab[31];
    ea = dataa[30:23];
    eb = datab[30:23];
    a_zero = (ea == 8'd0);
    b_zero = (eb == 8'd0);
    a_nan  = (ea == 8'hFF) && (dataa[22:0] != 23'd0);
    b_nan  = (eb == 8'hFF) && (datab[22:0] != 23'd0);
    a_inf  = (ea == 8'hFF) && (dataa[22:0] == 23'd0);
    b_inf  = (eb == 8'hFF) && (datab[22:0] == 23'd0);
    num = 50'd0; q = 27'd0; rem = 24'd0; m = 24'd0; g = 1'b0; st = 1'b0;
    mr = 25'd0; e = 10'd0;

    if (a_nan || b_nan || (a_zero && b_zero) || (a_inf && b_inf)) begin
      quot_c = 32'h7FC0_0000;
    end else if (a_inf || b_zero) begin
      quot_c = {s, 8'hFF, 23'd0};
    end else if (a_zero || b_inf) begin
      quot_c = {s, 31'd0};
    end else begin
      // (1.ma * 2^26) / 1.mb lies in [2^25, 2^27)
      num = {1'b1, dataa[22:0], 26'd0};
      q   = 27'(num / {26'd0, 1'b1, datab[22:0]});
      rem = 24'(num % {26'd0, 1'b1, datab[22:0]});
      e   = {2'b00, ea} - {2'b00, eb} + 10'd127;
      if (q[26]) begin
        m  = q[26:3];
        g  = q[2];
        st = (q[1:0] != 2'd0) || (rem != 24'd0);
      end else begin
        m  = q[25:2];
        g  = q[1];
        st = q[0] || (rem != 24'd0);
        e  = e - 10'd1;
      end
      mr = {1'b0, m};
      if (g && (st || m[0])) mr = mr + 25'd1;
      if (mr[24]) begin
        mr = mr >> 1;
        e  = e + 10'd1;
      end
      if (e[9] || e == 10'd0)  quot_c = {s, 31'd0};
      else if (e >= 10'd255)   quot_c = {s, 8'hFF, 23'd0};
      else                     quot_c = {s, e[7:0], mr[22:0]};
    end
  end

  logic [31:0] pipe [LATENCY];

  always_ff @(posedge clock) begin
    if (clk_en) begin
      pipe[0] <= quot_c;
      for (int i = 1; i < LATENCY; i++) pipe[i] <= pipe[i-1];
    end
  end

  assign result = pipe[LATENCY-1];

endmodule
