// fp_mult: pipelined IEEE-754 single-precision multiplier.
//
// The product is formed in one combinational step from the operands sampled
// at the clock edge and then delayed so that it appears LATENCY enabled clock
// edges after the operands are presented (5 by default, the multiplier
// latency used by the Bayesian-algebra ALU controller of the source design).
// One new pair of operands can be accepted every enabled cycle.
//
// Arithmetic (this design's choice): 24x24-bit mantissa product, round to
// nearest even, denormals flushed to zero, overflow to +/-infinity,
// 0 x infinity and NaN operands give a quiet NaN (the Bayesian rule
// 0 x infinity = 0 is applied one level up, in ba_mult and the GUT).
//
// Ports: clock, clk_en (freezes the pipeline when low), dataa, datab, result.
module fp_mult #(
  parameter int unsigned LATENCY = 5
) (
  input  logic        clock,
  input  logic        clk_en,
  input  logic [31:0] dataa,
  input  logic [31:0] datab,
  output logic [31:0] result
);

  logic [31:0] prod_c;

  always_comb begin
    logic        s;
    logic [7:0]  ea, eb;
    logic [23:0] ma, mb;
    logic [47:0] p;
    logic [23:0] m;
    logic        g, st;
    logic [24:0] mr;
    logic [9:0]  e;
    logic        a_nan, b_nan, a_inf, b_inf, a_zero, b_zero;

    s  = dataa[31] ^ datab[31];
    ea = dataa[30:23];
    eb = datab[30:23];
    ma = {1'b1, dataa[22:0]};
    mb = {1'b1, datab[22:0]};
    a_zero = (ea == 8'd0);
    b_zero = (eb == 8'd0);
    a_nan  = (ea == 8'hFF) && (dataa[22:0] != 23'd0);
    b_nan  = (eb == 8'hFF) && (datab[22:0] != 23'd0);
    a_inf  = (ea == 8'hFF) && (dataa[22:0] == 23'd0);
    b_inf  = (eb == 8'hFF) && (datab[22:0] == 23'd0);
    p = 48'd0; m = 24'd0; g = 1'b0; st = 1'b0; mr = 25'd0; e = 10'd0;

    if (a_nan || b_nan || (a_inf && b_zero) || (b_inf && a_zero)) begin
      prod_c = 32'h7FC0_0000;
    end else if (a_inf || b_inf) begin
      prod_c = {s, 8'hFF, 23'd0};
    end else if (a_zero || b_zero) begin
      prod_c = {s, 31'd0};
    end else begin
      p = ma * mb;
      e = {2'b00, ea} + {2'b00, eb} - 10'd127;
      if (p[47]) begin
        m  = p[47:24];
        g  = p[23];
        st = |p[22:0];
        e  = e + 10'd1;
      end else begin
        m  = p[46:23];
        g  = p[22];
        st = |p[21:0];
      end
      mr = {1'b0, m};
      if (g && (st || m[0])) mr = mr + 25'd1;
      if (mr[24]) begin
        mr = mr >> 1;
        e  = e + 10'd1;
      end
      if (e[9] || e == 10'd0)  prod_c = {s, 31'd0};
      else if (e >= 10'd255)   prod_c = {s, 8'hFF, 23'd0};
      else                     prod_c = {s, e[7:0], mr[22:0]};
    end
  end

  logic [31:0] pipe [LATENCY];

  always_ff @(posedge clock) begin
    if (clk_en) begin
      pipe[0] <= prod_c;
      for (int i = 1; i < LATENCY; i++) pipe[i] <= pipe[i-1];
    end
  end

  assign result = pipe[LATENCY-1];

endmodule
