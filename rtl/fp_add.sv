// fp_add: pipelined IEEE-754 single-precision adder.
//
// This is the floating-point addition unit that the GUT controller and the
// Bayesian-algebra adder share out in time. The arithmetic is done in one
// combinational step on the inputs sampled at the clock edge and then carried
// through a register chain so that the result appears LATENCY enabled clock
// edges after the operands are presented (7 by default, the latency of the
// vendor adder core the design was built around). A new pair of operands may
// be presented on every enabled cycle.
//
// Arithmetic: signed add, round to nearest even, denormal inputs and results
// flushed to zero, an overflowing result becomes +/-infinity, NaN or
// inf - inf gives a quiet NaN. 'overflow' flags a finite-input sum that
// overflowed and 'zero' flags a zero result; both follow the result through
// the pipeline. The exact rounding and flush-to-zero rules are this design's
// choice; the source design only fixes the latency and single precision.
//
// Ports: clock, clk_en (freezes the pipeline when low), dataa, datab,
// result, overflow, zero.
module fp_add #(
  parameter int unsigned LATENCY = 7
) (
  input  logic        clock,
  input  logic        clk_en,
  input  logic [31:0] dataa,
  input  logic [31:0] datab,
  output logic [31:0] result,
  output logic        overflow,
  output logic        zero
);

  logic [31:0] sum_c;
  logic        ovf_c;

  always_comb begin
    logic        sa, sb, sx, sy;
    logic [7:0]  ea, eb, ex, ey;
    logic [23:0] ma, mb, mx, my;
    logic [7:0]  d;
    logic [26:0] ax, ay;      // mantissa, guard, round, sticky
    logic [27:0] s;
    logic [9:0]  e;           // signed-ish working exponent
    logic [23:0] m;
    logic        g, st;
    logic [24:0] mr;
    int          lz;
    logic        a_nan, b_nan, a_inf, b_inf;

    sa = dataa[31]; ea = dataa[30:23];
    sb = datab[31]; eb = datab[30:23];
    ma = (ea == 8'd0) ? 24'd0 : {1'b1, dataa[22:0]};
    mb = (eb == 8'd0) ? 24'd0 : {1'b1, datab[22:0]};
    a_nan = (ea == 8'hFF) && (dataa[22:0] != 23'd0);
    b_nan = (eb == 8'hFF) && (datab[22:0] != 23'd0);
    a_inf = (ea == 8'hFF) && (dataa[22:0] == 23'd0);
    b_inf = (eb == 8'hFF) && (datab[22:0] == 23'd0);
    sum_c = 32'd0;
    ovf_c = 1'b0;
    // defaults keep every variable assigned on all paths
    sx = 1'b0; sy = 1'b0; ex = 8'd0; ey = 8'd0; mx = 24'd0; my = 24'd0;
    d = 8'd0; ax = 27'd0; ay = 27'd0; s = 28'd0; e = 10'd0; m = 24'd0;
    g = 1'b0; st = 1'b0; mr = 25'd0; lz = 0;

    if (a_nan || b_nan || (a_inf && b_inf && (sa != sb))) begin
      sum_c = 32'h7FC0_0000;
    end else if (a_inf) begin
      sum_c = {sa, 8'hFF, 23'd0};
    end else if (b_inf) begin
      sum_c = {sb, 8'hFF, 23'd0};
    end else if (ma == 24'd0 && mb == 24'd0) begin
      sum_c = {sa & sb, 31'd0};
    end else begin
      // order the operands so that |x| >= |y|
      if ({ea, ma} >= {eb, mb}) begin
        sx = sa; ex = ea; mx = ma; sy = sb; ey = eb; my = mb;
      end else begin
        sx = sb; ex = eb; mx = mb; sy = sa; ey = ea; my = ma;
      end
      if (my == 24'd0) ey = ex;  // a zero operand needs no alignment
      d  = ex - ey;
      ax = {mx, 3'b000};
      if (my == 24'd0) begin
        ay = 27'd0;
      end else if (d >= 8'd27) begin
        ay = 27'd1;
      end else begin
        ay = {my, 3'b000} >> d;
        if ((({my, 3'b000} << (8'd27 - d)) & 27'h7FF_FFFF) != 27'd0) ay[0] = 1'b1;
      end
      e = {2'b00, ex};
      if (sx == sy) begin
        s = {1'b0, ax} + {1'b0, ay};
        if (s[27]) begin
          s = {1'b0, s[27:2], s[1] | s[0]};
          e = e + 10'd1;
        end
      end else begin
        s = {1'b0, ax} - {1'b0, ay};
        lz = 0;
        for (int i = 26; i >= 0; i--) begin
          if (s[i]) break;
          lz++;
        end
        s = s << lz;
        e = e - 10'(lz);
      end
      // s[26:3] mantissa, s[2] guard, s[1:0] round/sticky
      m  = s[26:3];
      g  = s[2];
      st = s[1] | s[0];
      mr = {1'b0, m};
      if (g && (st || m[0])) mr = mr + 25'd1;
      if (mr[24]) begin
        mr = mr >> 1;
        e  = e + 10'd1;
      end
      if (s[26:0] == 27'd0) begin
        sum_c = 32'd0;                          // exact cancellation
      end else if (e[9] || e == 10'd0) begin
        sum_c = {sx, 31'd0};                    // flush to zero
      end else if (e >= 10'd255) begin
        sum_c = {sx, 8'hFF, 23'd0};
        ovf_c = 1'b1;
      end else begin
        sum_c = {sx, e[7:0], mr[22:0]};
      end
    end
  end

  logic [33:0] pipe [LATENCY];

  always_ff @(posedge clock) begin
    if (clk_en) begin
      pipe[0] <= {ovf_c, (sum_c[30:0] == 31'd0), sum_c};
      for (int i = 1; i < LATENCY; i++) pipe[i] <= pipe[i-1];
    end
  end

  assign result   = pipe[LATENCY-1][31:0];
  assign zero     = pipe[LATENCY-1][32];
  assign overflow = pipe[LATENCY-1][33];

endmodule
