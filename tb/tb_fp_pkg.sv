// tb_fp_pkg: reference arithmetic for the testbenches.
//
// Converts between single-precision bit patterns and SystemVerilog reals
// without using shortreal, rounds a real to single precision (round to
// nearest even, flush-to-zero below the smallest normal, overflow to
// infinity), and gives reference models of the Bayesian gate and of the
// Bayesian-algebra operators computed in double precision. Rounding a double
// result of one add, multiply or divide of two singles to single gives the
// correctly rounded single result, so these references are exact for one
// operation.
package tb_fp_pkg;

  localparam logic [31:0] F_ZERO = 32'h0000_0000;
  localparam logic [31:0] F_ONE  = 32'h3F80_0000;
  localparam logic [31:0] F_INF  = 32'h7F80_0000;

  function automatic real f2r(logic [31:0] f);
    logic [63:0] d;
    if (f[30:23] == 8'd0) return 0.0;
    if (f[30:23] == 8'hFF) begin
      d = {f[31], 11'h7FF, f[22:0], 29'd0};
      return $bitstoreal(d);
    end
    d = {f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  function automatic logic [31:0] r2f(real r);
    logic [63:0] d;
    int          e;
    logic [24:0] m;
    logic        g, st;
    d = $realtobits(r);
    if (d[62:52] == 11'h7FF) return {d[63], 8'hFF, (d[51:0] != 0) ? 23'h40_0000 : 23'd0};
    if (d[62:52] == 11'd0) return {d[63], 31'd0};
    e  = int'(d[62:52]) - 1023 + 127;
    m  = {2'b01, d[51:29]};
    g  = d[28];
    st = |d[27:0];
    if (g && (st || m[0])) m = m + 25'd1;
    if (m[24]) begin
      m = m >> 1;
      e = e + 1;
    end
    if (e <= 0) return {d[63], 31'd0};
    if (e >= 255) return {d[63], 8'hFF, 23'd0};
    return {d[63], 8'(e), m[22:0]};
  endfunction

  function automatic bit is_inf(logic [31:0] f);
    return f[30:23] == 8'hFF;
  endfunction

  function automatic bit is_f(logic [31:0] f);
    return f[30:23] == 8'd0;
  endfunction

  // Random single with exponent field in [lo, hi], positive.
  function automatic logic [31:0] rand_pos(int lo, int hi);
    int e;
    e = lo + int'($urandom_range(hi - lo));
    return {1'b0, 8'(e), 23'($urandom)};
  endfunction

  // Bayesian-algebra operators, references.
  function automatic logic [31:0] ref_ba_add(logic [31:0] a, logic [31:0] b);
    if (is_inf(a) || is_inf(b)) return F_INF;
    return r2f(f2r({1'b0, a[30:0]}) + f2r({1'b0, b[30:0]}));
  endfunction

  function automatic logic [31:0] ref_ba_mult(logic [31:0] a, logic [31:0] b);
    if (is_f(a) || is_f(b)) return F_ZERO;
    if (is_inf(a) || is_inf(b)) return F_INF;
    return r2f(f2r({1'b0, a[30:0]}) * f2r({1'b0, b[30:0]}));
  endfunction

  function automatic logic [31:0] ref_ba_div(logic [31:0] a, logic [31:0] b);
    if (is_inf(b)) return F_ZERO;
    if (is_f(a)) return F_ZERO;
    if (is_f(b) || is_inf(a)) return F_INF;
    return r2f(f2r({1'b0, a[30:0]}) / f2r({1'b0, b[30:0]}));
  endfunction

  // Generic Bayesian gate, following its truth table and, for three finite
  // numbers, the exact operation order of the hardware: ((x+y)+z) / ((x*y)*z + 1),
  // each step rounded to single precision.
  function automatic logic [31:0] ref_gut(logic [31:0] x, logic [31:0] y, logic [31:0] z);
    logic [31:0] v[3];
    int nf, nt, nv;
    logic [31:0] s1, s2, p1, p2, p3;
    nf = 0; nt = 0; nv = 0;
    foreach (v[i]) v[i] = 32'd0;
    for (int i = 0; i < 3; i++) begin
      logic [31:0] w;
      w = (i == 0) ? x : (i == 1) ? y : z;
      w[31] = 1'b0;
      if (is_inf(w)) nt++;
      else if (is_f(w)) nf++;
      else begin
        v[nv] = w;
        nv++;
      end
    end
    if (nv == 0) return (nt == 1 || nt == 2) ? F_INF : F_ZERO;
    if (nv == 1) begin
      if (nf == 2) return v[0];
      if (nf == 1) return F_INF;
      return F_ZERO;
    end
    if (nv == 2) begin
      if (nf == 1) return r2f(f2r(v[0]) + f2r(v[1]));
      p1 = r2f(f2r(v[0]) * f2r(v[1]));
      if (is_f(p1)) return F_INF;
      if (is_inf(p1)) return F_ZERO;
      return r2f(1.0 / f2r(p1));
    end
    s1 = r2f(f2r(v[0]) + f2r(v[1]));
    p1 = r2f(f2r(v[0]) * f2r(v[1]));
    s2 = r2f(f2r(s1) + f2r(v[2]));
    p2 = r2f(f2r(p1) * f2r(v[2]));
    p3 = r2f(f2r(p2) + 1.0);
    if (is_inf(p3)) return F_ZERO;
    if (is_inf(s2)) return F_INF;
    return r2f(f2r(s2) / f2r(p3));
  endfunction

endpackage
