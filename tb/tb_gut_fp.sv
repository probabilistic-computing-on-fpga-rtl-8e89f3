// tb_gut_fp: self-checking testbench of the floating-point Generic Bayesian
// Gate. Runs every row of the gate truth table in all input orders and checks
// both the result and the cycle count (1 for the cases without arithmetic,
// 9 for F,y,z, 14 for T,y,z, 32 for x,y,z), then random finite, False and
// True inputs against a reference model, including runs with the clock
// enable toggling and negative-signed inputs (the sign must be ignored).
`timescale 1ns/1ps
module tb_gut_fp;
  import tb_fp_pkg::*;

  logic        ncs_clk = 0;
  logic        ncs_reset, ncs_clk_en, ncs_start;
  logic [31:0] x, y, z, ncs_result;
  logic        ncs_done;
  int checks = 0, failures = 0;
  bit en_noise = 0;

  gut_fp dut (.*);

  always #5 ncs_clk = ~ncs_clk;

  initial begin
    repeat (400000) @(posedge ncs_clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge ncs_clk) if (en_noise) ncs_clk_en <= ($urandom_range(3) != 0);

  // Runs one gate operation; returns the cycle count between start and done
  // (start cycle and done cycle excluded), counting enabled cycles only.
  task automatic run(input logic [31:0] a, b, c, output logic [31:0] r, output int n);
    @(posedge ncs_clk);
    #1;
    while (ncs_done) @(posedge ncs_clk) #1;
    @(negedge ncs_clk);
    x = a; y = b; z = c; ncs_start = 1;
    do @(posedge ncs_clk); while (!ncs_clk_en);
    #1 ncs_start = 0;
    n = 0;
    forever begin
      @(posedge ncs_clk);
      if (ncs_clk_en) n++;
      #1;
      if (ncs_done) break;
    end
    r = ncs_result;
    x = 32'hDEAD_BEEF; y = 32'hDEAD_BEEF; z = 32'hDEAD_BEEF;
  endtask

  task automatic check(input logic [31:0] a, b, c, input int exp_n);
    logic [31:0] r, e;
    int n;
    run(a, b, c, r, n);
    e = ref_gut(a, b, c);
    checks++;
    if (r !== e) begin
      failures++;
      if (failures < 20) $display("G(%h,%h,%h) = %h, expected %h", a, b, c, r, e);
    end
    if (exp_n >= 0) begin
      checks++;
      if (n != exp_n) begin
        failures++;
        if (failures < 20) $display("G(%h,%h,%h) took %0d cycles, expected %0d", a, b, c, n, exp_n);
      end
    end
  endtask

  localparam logic [31:0] F = 32'h0, T = 32'h7F80_0000;

  initial begin
    logic [31:0] r3[3];
    logic [31:0] xv, yv, zv;
    ncs_reset = 1; ncs_clk_en = 1; ncs_start = 0; x = 0; y = 0; z = 0;
    repeat (3) @(posedge ncs_clk);
    ncs_reset = 0;
    // truth-table rows in every order
    for (int p = 0; p < 6; p++) begin
      int o0, o1, o2;
      o0 = (p < 2) ? 0 : (p < 4) ? 1 : 2;
      o1 = (p % 2 == 0) ? (o0 + 1) % 3 : (o0 + 2) % 3;
      o2 = 3 - o0 - o1;
      xv = rand_pos(110, 140); yv = rand_pos(110, 140); zv = rand_pos(110, 140);
      begin
        logic [31:0] rows[10][3];
        int          lat[10];
        rows[0] = '{F, F, F};   lat[0] = 1;
        rows[1] = '{F, F, T};   lat[1] = 1;
        rows[2] = '{F, T, T};   lat[2] = 1;
        rows[3] = '{T, T, T};   lat[3] = 1;
        rows[4] = '{F, F, zv};  lat[4] = 1;
        rows[5] = '{F, T, zv};  lat[5] = 1;
        rows[6] = '{T, T, zv};  lat[6] = 1;
        rows[7] = '{F, yv, zv}; lat[7] = 9;
        rows[8] = '{T, yv, zv}; lat[8] = 14;
        rows[9] = '{xv, yv, zv}; lat[9] = 32;
        for (int k = 0; k < 10; k++)
          check(rows[k][o0], rows[k][o1], rows[k][o2], lat[k]);
      end
    end
    // the worked value of the gate with U inputs: G(1,1,1) = 3/2
    begin
      logic [31:0] r; int n;
      run(32'h3F80_0000, 32'h3F80_0000, 32'h3F80_0000, r, n);
      checks++;
      if (r !== 32'h3FC0_0000) failures++;
    end
    // G(U, T, G(x, y, T)) = x*y (multiplication built from two gates)
    begin
      logic [31:0] r1, r2; int n;
      xv = 32'h4000_0000; yv = 32'h4080_0000;       // 2, 4
      run(xv, yv, T, r1, n);
      run(32'h3F80_0000, T, r1, r2, n);
      checks++;
      if (r2 !== 32'h4100_0000) begin               // 8
        failures++;
        $display("G(U,T,G(2,4,T)) = %h", r2);
      end
    end
    // random mixes, signs flipped at random
    for (int i = 0; i < 600; i++) begin
      for (int k = 0; k < 3; k++) begin
        case ($urandom_range(5))
          0: r3[k] = F;
          1: r3[k] = T;
          2: r3[k] = rand_pos(1, 254);
          default: r3[k] = rand_pos(100, 150);
        endcase
        r3[k][31] = 1'($urandom);
      end
      check(r3[0], r3[1], r3[2], -1);
    end
    // clock-enable stalls: results and enabled-cycle counts must not change
    en_noise = 1;
    for (int i = 0; i < 100; i++) begin
      xv = rand_pos(110, 140); yv = rand_pos(110, 140); zv = rand_pos(110, 140);
      check(xv, yv, zv, 32);
      check(T, yv, zv, 14);
      check(F, yv, zv, 9);
    end
    en_noise = 0;
    ncs_clk_en = 1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
