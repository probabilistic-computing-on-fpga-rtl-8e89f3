// tb_fp_add: self-checking testbench of the pipelined single-precision adder.
// Streams one random operand pair per enabled cycle (mixed signs, wide and
// narrow exponent gaps, cancellations, zeros, infinities, overflow), gates
// clk_en off at random to check that the pipeline freezes, and compares every
// result against a double-precision reference rounded to single precision.
// It also checks that the latency is exactly LATENCY enabled cycles.
`timescale 1ns/1ps
module tb_fp_add;
  import tb_fp_pkg::*;
  localparam int LAT = 7;
  localparam int N   = 3000;

  logic clock = 0;
  logic clk_en;
  logic [31:0] dataa, datab, result;
  logic overflow, zero;
  int checks = 0, failures = 0;
  int cycles = 0;

  fp_add #(.LATENCY(LAT)) dut (.*);

  always #5 clock = ~clock;

  initial begin
    repeat (200000) @(posedge clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] ref_add(logic [31:0] a, logic [31:0] b);
    if ((is_inf(a) && is_inf(b) && a[31] != b[31])) return 32'h7FC0_0000;
    if (is_inf(a)) return {a[31], 8'hFF, 23'd0};
    if (is_inf(b)) return {b[31], 8'hFF, 23'd0};
    if (is_f(a) && is_f(b)) return {a[31] & b[31], 31'd0};
    return r2f(f2r(a) + f2r(b));
  endfunction

  function automatic logic [31:0] pick(int k);
    case ($urandom_range(9))
      0: return 32'd0;
      1: return {1'($urandom), 8'hFF, 23'd0};
      2: return {1'($urandom), 8'($urandom_range(250, 254)), 23'($urandom)};
      default: return {1'($urandom), 8'($urandom_range(100 + k, 150 - k)), 23'($urandom)};
    endcase
  endfunction

  logic [31:0] qa[$], qb[$];
  int lat_seen;

  initial begin
    logic [31:0] a, b, exp_r;
    clk_en = 1; dataa = 0; datab = 0;
    // latency: present one pair, then watch for it
    @(negedge clock);
    dataa = 32'h3F80_0000; datab = 32'h4000_0000; // 1 + 2
    @(negedge clock);
    dataa = 0; datab = 0;
    lat_seen = 1;
    while (result != 32'h4040_0000 && lat_seen < 50) begin
      @(negedge clock);
      lat_seen++;
    end
    checks++;
    if (lat_seen != LAT) begin
      failures++;
      $display("latency %0d, expected %0d", lat_seen, LAT);
    end
    // streaming with random clock-enable gaps
    for (int i = 0; i < N + LAT; i++) begin
      @(negedge clock);
      clk_en = ($urandom_range(7) != 0);
      if (i < N) begin
        a = pick(i % 40);
        b = ($urandom_range(3) == 0) ? {~a[31], a[30:0] ^ 31'($urandom_range(3))} : pick(i % 40);
      end else begin
        a = 0; b = 0;
      end
      dataa = a; datab = b;
      if (clk_en) begin
        qa.push_back(a); qb.push_back(b);
        if (qa.size() > LAT) begin
          logic [31:0] ra, rb;
          ra = qa.pop_front(); rb = qb.pop_front();
          exp_r = ref_add(ra, rb);
          checks++;
          if (result !== exp_r) begin
            failures++;
            if (failures < 10) $display("add %h + %h = %h, expected %h", ra, rb, result, exp_r);
          end
          if (is_inf(exp_r) && !is_inf(ra) && !is_inf(rb)) begin
            checks++;
            if (!overflow) failures++;
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
