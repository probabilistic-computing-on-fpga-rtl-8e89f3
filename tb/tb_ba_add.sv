// tb_ba_add: self-checking testbench of the Bayesian-algebra add operator.
// Streams random operand pairs (False, True, NaN patterns, negative signs,
// ordinary and extreme finite values) one per enabled cycle with random
// clock-enable gaps, and compares each result, LATENCY enabled cycles later,
// with the Bayesian-algebra reference. Checks the latency on its own first
// and the Boolean rows of the Bayesian-algebra table explicitly.
`timescale 1ns/1ps
module tb_ba_add;
  import tb_fp_pkg::*;
  localparam int LAT = 7;
  localparam int N   = 3000;

  logic clock = 0;
  logic clk_en;
  logic [31:0] dataa, datab, result;
  int checks = 0, failures = 0;

  ba_add dut (.*);

  always #5 clock = ~clock;

  initial begin
    repeat (100000) @(posedge clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] pick();
    logic [31:0] v;
    case ($urandom_range(9))
      0: v = 32'd0;
      1: v = F_INF;
      2: v = 32'h7FC0_0001;
      3: v = {1'b0, 8'($urandom_range(250, 254)), 23'($urandom)};
      4: v = {1'b0, 8'($urandom_range(1, 4)), 23'($urandom)};
      default: v = rand_pos(90, 160);
    endcase
    v[31] = 1'($urandom);
    return v;
  endfunction

  logic [31:0] qa[$], qb[$];

  task automatic one(input logic [31:0] a, b, input logic [31:0] exp_r);
    int n;
    // hold a marker operation long enough to fill the pipeline, apply the
    // pair for one cycle, then return to the marker
    @(negedge clock);
    clk_en = 1; dataa = 32'h4000_0000; datab = 32'h4000_0000;
    repeat (LAT + 1) @(negedge clock);
    dataa = a; datab = b;
    @(negedge clock);
    dataa = 32'h4000_0000; datab = 32'h4000_0000;
    n = 1;
    while (result !== exp_r && n < 40) begin
      @(negedge clock);
      n++;
    end
    checks++;
    if (n != LAT) begin
      failures++;
      $display("%h op %h: result %h after %0d cycles, expected %h after %0d", a, b, result, n, exp_r, LAT);
    end
  endtask

  initial begin
    logic [31:0] a, b, exp_r;
    clk_en = 1; dataa = 0; datab = 0;
    repeat (LAT + 2) @(negedge clock);
    one(32'h3F80_0000, 32'h4000_0000, 32'h4040_0000);  // 1 + 2 = 3
    one(F_ZERO, F_ZERO, F_ZERO);                       // 0 + 0 = 0
    one(F_INF, F_INF, F_INF);                          // inf + inf = inf
    one(F_INF, F_ZERO, F_INF);                         // inf + 0 = inf
    one(32'h7F7F_FFFF, 32'h7F7F_FFFF, F_INF);          // overflow -> True
    for (int i = 0; i < N + LAT; i++) begin
      @(negedge clock);
      clk_en = ($urandom_range(5) != 0);
      a = pick(); b = pick();
      dataa = a; datab = b;
      if (clk_en) begin
        qa.push_back(a); qb.push_back(b);
        if (qa.size() > LAT) begin
          logic [31:0] ra, rb;
          ra = qa.pop_front(); rb = qb.pop_front();
          exp_r = ref_ba_add(ra, rb);
          checks++;
          if (result !== exp_r) begin
            failures++;
            if (failures < 10) $display("%h op %h = %h, expected %h", ra, rb, result, exp_r);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
