// tb_bayes_top: end-to-end testbench of the whole accelerator set at its
// default sizes. Plays the part of the processor and of the memory:
//  - sprinkler-network odds y = (a10*x10 + a11*x11) / (1 + a01*x01) with the
//    Bayesian-algebra ALU, checked against the reference operators;
//  - the same kind of product, x*y = G(U, T, G(x, y, T)), with two calls of
//    the single-gate DMA instruction, plus every gate truth-table case;
//  - two-layer static-tree calls through DMA;
//  - 1/((a+b)*(1/c+d)) on the four-gate tree, on the operator ALU (five
//    instructions) and checked bit-exact between the two;
//  - the operator tree and the published fixed-point gate vectors.
// Counts each mechanism (each gate case, memory wait states, gaps in the
// burst, first-layer loads, child-done start of a tree gate, each ALU
// operation, Bayesian special cases, fixed-point saturation, clock-enable
// freeze) and fails if one never happened.
`timescale 1ns/1ps
module tb_bayes_top;
  import tb_fp_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  logic        reset, clk_en;
  logic        gut_start, gut_done;
  logic [31:0] gut_dataa, gut_result;
  logic [31:0] gut_avm_address, gut_avm_readdata;
  logic        gut_avm_read, gut_avm_waitrequest, gut_avm_readdatavalid;
  logic [1:0]  gut_avm_burstcount;
  logic        tree_start, tree_done;
  logic [31:0] tree_dataa, tree_result;
  logic [31:0] tree_avm_address, tree_avm_readdata;
  logic        tree_avm_read, tree_avm_waitrequest, tree_avm_readdatavalid;
  logic [4:0]  tree_avm_burstcount;
  logic        alu_start, alu_done;
  logic [1:0]  alu_n;
  logic [31:0] alu_dataa, alu_datab, alu_result;
  logic [31:0] fix_dataa;
  logic [15:0] fix_datab, fix_result;
  logic        dyn_start, dyn_done;
  logic [31:0] dyn_a, dyn_b, dyn_c, dyn_d, dyn_result;
  logic [31:0] bat_input1, bat_input2, bat_input3, bat_input4, bat_result;

  bayes_top dut (.*);

  avalon_mem_model #(.DEPTH(1024), .LATENCY(6), .BC_W(2)) u_gmem (
    .clk, .address(gut_avm_address), .read(gut_avm_read), .burstcount(gut_avm_burstcount),
    .waitrequest(gut_avm_waitrequest), .readdata(gut_avm_readdata), .readdatavalid(gut_avm_readdatavalid)
  );
  avalon_mem_model #(.DEPTH(1024), .LATENCY(6), .BC_W(5)) u_tmem (
    .clk, .address(tree_avm_address), .read(tree_avm_read), .burstcount(tree_avm_burstcount),
    .waitrequest(tree_avm_waitrequest), .readdata(tree_avm_readdata), .readdatavalid(tree_avm_readdatavalid)
  );

  int checks = 0, failures = 0;

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input string what, input logic [31:0] got, exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("%s: %h, expected %h", what, got, exp);
    end
  endtask

  // ---------------------------------------------------------------- mechanisms
  int m_comb = 0, m_add = 0, m_div = 0, m_func = 0;
  int m_wait = 0, m_gap = 0, m_load = 0, m_child = 0;
  int m_alu[3] = '{0, 0, 0};
  int m_special = 0, m_sat = 0, m_freeze = 0;
  bit in_burst = 0;

  always @(posedge clk) begin
    // gate cases in the single gate, as its controller leaves START
    if (clk_en && dut.u_gut_ci.u_gut.u_ctrl.state == dut.u_gut_ci.u_gut.u_ctrl.START) begin
      case (dut.u_gut_ci.u_gut.u_ctrl.n_v)
        2: if (dut.u_gut_ci.u_gut.u_ctrl.n_f == 1) m_add++; else m_div++;
        3: m_func++;
        default: m_comb++;
      endcase
    end
    if (gut_avm_read && gut_avm_waitrequest) m_wait++;
    if (tree_avm_read && !tree_avm_waitrequest) in_burst <= 1;
    if (tree_done) in_burst <= 0;
    if (in_burst && dut.u_tree_ci.u_dma.state == dut.u_tree_ci.u_dma.S_RECV && !tree_avm_readdatavalid) m_gap++;
    if (dut.u_tree_ci.u_dma.gut_start) m_load++;
    if (dut.u_tree_ci.u_tree.gstart[3]) m_child++;
    if (alu_start && clk_en) m_alu[alu_n]++;
    if (!clk_en && dut.u_alu_ci.u_ctrl.state == dut.u_alu_ci.u_ctrl.S_WAIT) m_freeze++;
  end

  // ---------------------------------------------------------------- helpers
  task automatic alu(input logic [1:0] n, input logic [31:0] a, b, output logic [31:0] r);
    @(negedge clk);
    alu_n = n; alu_dataa = a; alu_datab = b; alu_start = 1;
    @(negedge clk);
    alu_start = 0;
    // freeze the processor side for a few cycles now and then
    if ($urandom_range(3) == 0) begin
      clk_en = 0;
      repeat (3) @(negedge clk);
      clk_en = 1;
    end
    while (!alu_done) @(negedge clk);
    r = alu_result;
    if ((is_f(a) && is_inf(b)) || (is_inf(a) && is_f(b))) m_special++;
  endtask

  task automatic gut(input logic [31:0] x, y, z, output logic [31:0] r);
    int base;
    base = int'($urandom_range(1000));
    u_gmem.mem[base] = x; u_gmem.mem[base+1] = y; u_gmem.mem[base+2] = z;
    @(negedge clk);
    gut_dataa = 32'(base * 4); gut_start = 1;
    @(negedge clk);
    gut_start = 0;
    while (!gut_done) @(negedge clk);
    r = gut_result;
  endtask

  task automatic tree(input logic [31:0] in [9], output logic [31:0] r);
    int base;
    base = int'($urandom_range(1000));
    foreach (in[i]) u_tmem.mem[base + i] = in[i];
    @(negedge clk);
    tree_dataa = 32'(base * 4); tree_start = 1;
    @(negedge clk);
    tree_start = 0;
    while (!tree_done) @(negedge clk);
    r = tree_result;
  endtask

  task automatic dyn(input logic [31:0] a, b, c, d, output logic [31:0] r);
    @(negedge clk);
    dyn_a = a; dyn_b = b; dyn_c = c; dyn_d = d; dyn_start = 1;
    @(negedge clk);
    dyn_start = 0;
    while (!dyn_done) @(negedge clk);
    r = dyn_result;
  endtask

  localparam logic [31:0] F = 32'h0, T = 32'h7F80_0000, U = 32'h3F80_0000;

  // ---------------------------------------------------------------- stimulus
  initial begin
    logic [31:0] r, r2, e;
    reset = 1; clk_en = 1;
    gut_start = 0; gut_dataa = 0; tree_start = 0; tree_dataa = 0;
    alu_start = 0; alu_n = 0; alu_dataa = 0; alu_datab = 0;
    fix_dataa = 0; fix_datab = 0; dyn_start = 0;
    dyn_a = 0; dyn_b = 0; dyn_c = 0; dyn_d = 0;
    bat_input1 = U; bat_input2 = U; bat_input3 = U; bat_input4 = U;
    repeat (4) @(posedge clk);
    reset = 0;

    // sprinkler network: odds that it rained given the grass state
    for (int t = 0; t < 20; t++) begin
      logic [31:0] a10, x10, a11, x11, a01, x01, p1, p2, p3, s, den, y;
      a10 = rand_pos(120, 130); x10 = rand_pos(120, 130);
      a11 = rand_pos(120, 130); x11 = rand_pos(120, 130);
      a01 = rand_pos(120, 130); x01 = (t == 0) ? F : (t == 1) ? T : rand_pos(120, 130);
      alu(2'd1, a10, x10, p1);
      alu(2'd1, a11, x11, p2);
      alu(2'd0, p1, p2, s);
      alu(2'd1, a01, x01, p3);
      alu(2'd0, U, p3, den);
      alu(2'd2, s, den, y);
      e = ref_ba_div(ref_ba_add(ref_ba_mult(a10, x10), ref_ba_mult(a11, x11)),
                     ref_ba_add(U, ref_ba_mult(a01, x01)));
      expect_eq("sprinkler odds (ALU)", y, e);
      // the products again with gates: x*y = G(U, T, G(x, y, T))
      gut(a10, x10, T, r);
      gut(U, T, r, r2);
      expect_eq("G(U,T,G(x,y,T))", r2, ref_gut(U, T, ref_gut(a10, x10, T)));
    end
    // Bayesian special case through the ALU: 0 x inf = 0
    alu(2'd1, F, T, r);
    expect_eq("0 x inf", r, F);

    // every gate case through DMA
    for (int t = 0; t < 60; t++) begin
      logic [31:0] v[3];
      foreach (v[i]) case ($urandom_range(3))
        0: v[i] = F;
        1: v[i] = T;
        default: v[i] = rand_pos(115, 140);
      endcase
      gut(v[0], v[1], v[2], r);
      expect_eq("single gate", r, ref_gut(v[0], v[1], v[2]));
    end

    // static tree through DMA
    for (int t = 0; t < 30; t++) begin
      logic [31:0] in [9];
      logic [31:0] l1 [3];
      foreach (in[i]) case ($urandom_range(5))
        0: in[i] = F;
        1: in[i] = T;
        2: in[i] = U;
        default: in[i] = rand_pos(118, 136);
      endcase
      for (int g = 0; g < 3; g++) l1[g] = ref_gut(in[3*g], in[3*g+1], in[3*g+2]);
      tree(in, r);
      expect_eq("static tree", r, ref_gut(l1[0], l1[1], l1[2]));
    end

    // 1/((a+b)*(1/c+d)): four-gate tree against five ALU instructions
    for (int t = 0; t < 20; t++) begin
      logic [31:0] a, b, c, d, s1, ic, s2, p;
      a = rand_pos(115, 135); b = rand_pos(115, 135); c = rand_pos(115, 135); d = rand_pos(115, 135);
      dyn(a, b, c, d, r);
      alu(2'd0, a, b, s1);
      alu(2'd2, U, c, ic);
      alu(2'd0, ic, d, s2);
      alu(2'd1, s1, s2, p);
      alu(2'd2, U, p, r2);
      expect_eq("gate tree vs ALU", r, r2);
      // the operator tree on the same values
      @(negedge clk);
      bat_input1 = a; bat_input2 = b; bat_input3 = c; bat_input4 = d;
      repeat (20) @(negedge clk);
      expect_eq("operator tree", bat_result,
                ref_ba_div(ref_ba_add(ref_ba_add(a, b), c), ref_ba_mult(c, d)));
    end

    // fixed-point gate: published outputs
    begin
      logic [15:0] vin[10][3];
      logic [15:0] vout[10];
      vin[0] = '{16'h0000, 16'h0000, 16'h0000}; vout[0] = 16'h0000;
      vin[1] = '{16'h0000, 16'h0000, 16'hFFFF}; vout[1] = 16'hFFFF;
      vin[2] = '{16'h0000, 16'hFFFF, 16'hFFFF}; vout[2] = 16'hFFFF;
      vin[3] = '{16'hFFFF, 16'hFFFF, 16'hFFFF}; vout[3] = 16'h0000;
      vin[4] = '{16'h0000, 16'h0000, 16'h0700}; vout[4] = 16'h0700;
      vin[5] = '{16'h0000, 16'hFFFF, 16'h0700}; vout[5] = 16'hFFFF;
      vin[6] = '{16'hFFFF, 16'hFFFF, 16'h0700}; vout[6] = 16'h0049;
      vin[7] = '{16'h0000, 16'h5000, 16'h0700}; vout[7] = 16'h5356;
      vin[8] = '{16'hFFFF, 16'h5000, 16'h0700}; vout[8] = 16'hFCC5;
      vin[9] = '{16'h7000, 16'h5000, 16'h0700}; vout[9] = 16'h8E1F;
      for (int i = 0; i < 10; i++) begin
        @(negedge clk);
        fix_dataa = {vin[i][1], vin[i][0]}; fix_datab = vin[i][2];
        #1;
        if (fix_result == 16'hFFFF) m_sat++;
        checks++;
        // one published value differs by one unit in the last place
        if (!(fix_result == vout[i] || (i == 8 && fix_result == vout[i] - 16'd1))) begin
          failures++;
          $display("fixed gate %0d: %h, expected %h", i, fix_result, vout[i]);
        end
      end
    end

    // every mechanism must have happened
    begin
      int m[string];
      m["gate without arithmetic"] = m_comb;
      m["gate F,y,z"] = m_add;
      m["gate T,y,z"] = m_div;
      m["gate x,y,z"] = m_func;
      m["memory wait states"] = m_wait;
      m["gaps in a burst"] = m_gap;
      m["first-layer loads"] = m_load;
      m["tree gate started by children"] = m_child;
      m["ALU add"] = m_alu[0];
      m["ALU multiply"] = m_alu[1];
      m["ALU divide"] = m_alu[2];
      m["0 x inf special case"] = m_special;
      m["fixed-point saturation"] = m_sat;
      m["clock-enable freeze"] = m_freeze;
      foreach (m[k]) begin
        $display("%-32s %0d", k, m[k]);
        checks++;
        if (m[k] == 0) begin
          failures++;
          $display("mechanism never exercised: %s", k);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
