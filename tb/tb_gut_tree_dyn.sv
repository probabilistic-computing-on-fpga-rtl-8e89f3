// tb_gut_tree_dyn: self-checking testbench of the four-gate tree computing
// 1/((a+b)*(1/c+d)). Random finite, False and True inputs; the result is
// compared with the composition of reference gates, and for finite inputs
// the start-to-done time is checked to be 41 cycles.
`timescale 1ns/1ps
module tb_gut_tree_dyn;
  import tb_fp_pkg::*;

  logic        ncs_clk = 0;
  logic        ncs_reset, ncs_clk_en, ncs_start, ncs_done;
  logic [31:0] a, b, c, d, ncs_result;
  int checks = 0, failures = 0;

  gut_tree_dyn dut (.*);

  always #5 ncs_clk = ~ncs_clk;

  initial begin
    repeat (200000) @(posedge ncs_clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] pick(bit finite);
    if (finite) return rand_pos(112, 142);
    case ($urandom_range(4))
      0: return F_ZERO;
      1: return F_INF;
      default: return rand_pos(112, 142);
    endcase
  endfunction

  initial begin
    logic [31:0] va, vb, vc, vd, e;
    int cyc;
    bit fin;
    ncs_reset = 1; ncs_clk_en = 1; ncs_start = 0; a = 0; b = 0; c = 0; d = 0;
    repeat (3) @(posedge ncs_clk);
    ncs_reset = 0;
    for (int t = 0; t < 300; t++) begin
      fin = (t % 2 == 0);
      va = pick(fin); vb = pick(fin); vc = pick(fin); vd = pick(fin);
      e = ref_gut(F_INF, ref_gut(F_ZERO, va, vb), ref_gut(F_ZERO, ref_gut(F_INF, F_ONE, vc), vd));
      @(negedge ncs_clk);
      a = va; b = vb; c = vc; d = vd; ncs_start = 1;
      @(negedge ncs_clk);
      ncs_start = 0;
      a = 32'hDEAD_BEEF; b = 32'hDEAD_BEEF; c = 32'hDEAD_BEEF; d = 32'hDEAD_BEEF;
      cyc = 1;
      while (!ncs_done && cyc < 500) begin
        @(negedge ncs_clk);
        cyc++;
      end
      checks++;
      if (ncs_result !== e) begin
        failures++;
        if (failures < 10) $display("tree(%h,%h,%h,%h) = %h, expected %h", va, vb, vc, vd, ncs_result, e);
      end
      if (fin) begin
        checks++;
        if (cyc != 41) begin
          failures++;
          if (failures < 10) $display("took %0d cycles", cyc);
        end
      end
      @(negedge ncs_clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
