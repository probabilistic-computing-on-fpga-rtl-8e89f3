// tb_gut_tree_ci: self-checking testbench of the static GUT tree custom
// instruction with DMA, default two layers (9 inputs, 4 gates). Places the
// nine inputs in a behavioural burst memory, issues the instruction, and
// checks the returned tree output against a gate-by-gate reference, for
// random mixes of False, True, U and finite inputs. Reports best and worst
// start-to-done times.
`timescale 1ns/1ps
module tb_gut_tree_ci;
  import tb_fp_pkg::*;
  localparam int NIN = 9;

  logic        ncs_clk = 0;
  logic        ncs_reset, ncs_clk_en, ncs_start, ncs_done;
  logic [31:0] ncs_dataa, ncs_result;
  logic [31:0] avm_address, avm_readdata;
  logic        avm_read, avm_waitrequest, avm_readdatavalid;
  logic [3:0]  avm_burstcount;
  int checks = 0, failures = 0;

  gut_tree_ci dut (.*);

  avalon_mem_model #(.DEPTH(512), .LATENCY(5), .BC_W(4)) u_mem (
    .clk(ncs_clk), .address(avm_address), .read(avm_read), .burstcount(avm_burstcount),
    .waitrequest(avm_waitrequest), .readdata(avm_readdata), .readdatavalid(avm_readdatavalid)
  );

  always #5 ncs_clk = ~ncs_clk;

  initial begin
    repeat (300000) @(posedge ncs_clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] pick(bit finite);
    if (finite) return rand_pos(118, 136);
    case ($urandom_range(6))
      0: return F_ZERO;
      1: return F_INF;
      2: return F_ONE;
      default: return rand_pos(118, 136);
    endcase
  endfunction

  int best = 1 << 30, worst = 0;

  initial begin
    logic [31:0] in [NIN];
    logic [31:0] l1 [3];
    logic [31:0] e;
    int base, cyc;
    ncs_reset = 1; ncs_clk_en = 1; ncs_start = 0; ncs_dataa = 0;
    repeat (3) @(posedge ncs_clk);
    ncs_reset = 0;
    for (int t = 0; t < 300; t++) begin
      base = int'($urandom_range(500));
      foreach (in[i]) begin
        in[i] = pick(t % 2 == 0);
        u_mem.mem[base + i] = in[i];
      end
      for (int g = 0; g < 3; g++) l1[g] = ref_gut(in[3*g], in[3*g+1], in[3*g+2]);
      e = ref_gut(l1[0], l1[1], l1[2]);
      @(negedge ncs_clk);
      ncs_dataa = 32'(base * 4); ncs_start = 1;
      @(negedge ncs_clk);
      ncs_start = 0;
      cyc = 1;
      while (!ncs_done && cyc < 1000) begin
        @(negedge ncs_clk);
        cyc++;
      end
      if (cyc < best) best = cyc;
      if (cyc > worst) worst = cyc;
      checks++;
      if (ncs_result !== e) begin
        failures++;
        if (failures < 10) $display("tree result %h, expected %h", ncs_result, e);
      end
      @(negedge ncs_clk);
    end
    $display("start-to-done cycles: best %0d, worst %0d", best, worst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
