// tb_gut_fixed: self-checking testbench of the 16-bit fixed-point gate.
// Checks the ten published input/output pairs of the gate (one per row of
// the gate truth table) and random inputs against a model of the same
// rounding written independently here, plus symmetry in the first two inputs (the rounding order makes the
// third input different)
// and closeness (a few LSB) to the exact real-valued function.
`timescale 1ns/1ps
module tb_gut_fixed;
  logic [15:0] pp, qq, rr, frac;
  int checks = 0, failures = 0;

  gut_fixed dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference: 64-bit integer arithmetic, values scaled by 2^16
  function automatic longint rnd16(longint v);
    return (v + 32768) >>> 16;
  endfunction
  function automatic longint clamp(longint v);
    if (v < 0) return 0;
    if (v > 64'hFF_FFFF) return 64'hFF_FFFF;
    return v;
  endfunction
  function automatic logic [15:0] model(logic [15:0] a, logic [15:0] b, logic [15:0] c);
    longint p, q, r, pq, qr, pr, t, s, two, n, d, qt, res;
    p = a; q = b; r = c;
    pq = clamp(rnd16(p * q)); qr = clamp(rnd16(q * r)); pr = clamp(rnd16(p * r));
    t  = clamp(rnd16(3 * pq * r));
    s  = clamp(p + q + r);
    two = clamp(2 * (pq + qr + pr));
    n  = clamp(s + t - two);
    d  = clamp(t + 65536 - pq - qr - pr);
    if (d == 0) return 16'hFFFF;
    qt = (n << 24) / d;
    res = clamp((qt + 128) >>> 8);
    return (res < 65536) ? 16'(res) : 16'hFFFF;
  endfunction

  function automatic real ideal(logic [15:0] a, logic [15:0] b, logic [15:0] c);
    real p, q, r;
    p = (a == 16'hFFFF) ? 1.0 : a / 65536.0;
    q = (b == 16'hFFFF) ? 1.0 : b / 65536.0;
    r = (c == 16'hFFFF) ? 1.0 : c / 65536.0;
    return (p + q + r - 2.0 * (p*q + q*r + p*r) + 3.0 * p*q*r) / (1.0 - p*q - q*r - p*r + 3.0*p*q*r);
  endfunction

  task automatic apply(input logic [15:0] a, b, c, input logic [15:0] e, input int tol);
    int diff;
    pp = a; qq = b; rr = c;
    #1;
    diff = int'(frac) - int'(e);
    if (diff < 0) diff = -diff;
    checks++;
    if (diff > tol) begin
      failures++;
      if (failures < 10) $display("g'(%h,%h,%h) = %h, expected %h", a, b, c, frac, e);
    end
  endtask

  initial begin
    // published results of the 16-bit gate
    apply(16'h0000, 16'h0000, 16'h0000, 16'h0000, 0);
    apply(16'h0000, 16'h0000, 16'hFFFF, 16'hFFFF, 0);
    apply(16'h0000, 16'hFFFF, 16'hFFFF, 16'hFFFF, 0);
    apply(16'hFFFF, 16'hFFFF, 16'hFFFF, 16'h0000, 0);
    apply(16'h0000, 16'h0000, 16'h0700, 16'h0700, 0);
    apply(16'h0000, 16'hFFFF, 16'h0700, 16'hFFFF, 0);
    apply(16'hFFFF, 16'hFFFF, 16'h0700, 16'h0049, 0);
    apply(16'h0000, 16'h5000, 16'h0700, 16'h5356, 0);
    apply(16'hFFFF, 16'h5000, 16'h0700, 16'hFCC5, 1);
    apply(16'h7000, 16'h5000, 16'h0700, 16'h8E1F, 0);
    // random inputs: exact against the model, symmetric, close to ideal
    for (int i = 0; i < 3000; i++) begin
      logic [15:0] a, b, c, f0, f1;
      real id;
      int err;
      a = 16'($urandom); b = 16'($urandom); c = 16'($urandom);
      if ($urandom_range(7) == 0) a = 16'hFFFF;
      if ($urandom_range(7) == 0) b = 16'h0000;
      apply(a, b, c, model(a, b, c), 0);
      f0 = frac;
      pp = b; qq = a; rr = c;
      #1 f1 = frac;
      checks++;
      if (f1 !== f0) failures++;
      id = ideal(a, b, c);
      if (id >= 0.0 && id < 0.99 && a != 16'hFFFF) begin
        err = int'(f0) - int'(id * 65536.0);
        checks++;
        if (err > 40 || err < -40) begin
          failures++;
          $display("g'(%h,%h,%h) = %h, ideal %f", a, b, c, f0, id);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
