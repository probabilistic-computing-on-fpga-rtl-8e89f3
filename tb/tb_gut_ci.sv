// tb_gut_ci: self-checking testbench of the single-gate custom instruction
// with DMA. The three gate inputs are placed in a behavioural burst memory
// at a random word address, the instruction is issued with that byte
// address, and the returned result is checked against the reference gate.
// Covers every truth-table row, random inputs, and a memory with random
// waitrequest, latency and gaps. Reports the best and worst start-to-done
// times seen.
`timescale 1ns/1ps
module tb_gut_ci;
  import tb_fp_pkg::*;

  logic        ncs_clk = 0;
  logic        ncs_reset, ncs_clk_en, ncs_start, ncs_done;
  logic [31:0] ncs_dataa, ncs_result;
  logic [31:0] avm_address, avm_readdata;
  logic        avm_read, avm_waitrequest, avm_readdatavalid;
  logic [1:0]  avm_burstcount;
  int checks = 0, failures = 0;

  gut_ci dut (.*);

  avalon_mem_model #(.DEPTH(512), .LATENCY(5), .BC_W(2)) u_mem (
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

  function automatic logic [31:0] pick();
    case ($urandom_range(5))
      0: return F_ZERO;
      1: return F_INF;
      default: return rand_pos(112, 142);
    endcase
  endfunction

  int best = 1 << 30, worst = 0;

  task automatic call(input logic [31:0] x, y, z);
    int base, cyc;
    logic [31:0] e;
    base = int'($urandom_range(500));
    u_mem.mem[base] = x; u_mem.mem[base+1] = y; u_mem.mem[base+2] = z;
    e = ref_gut(x, y, z);
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
      if (failures < 10) $display("G(%h,%h,%h) = %h, expected %h", x, y, z, ncs_result, e);
    end
    @(negedge ncs_clk);
  endtask

  localparam logic [31:0] F = 32'h0, T = 32'h7F80_0000;

  initial begin
    logic [31:0] v;
    ncs_reset = 1; ncs_clk_en = 1; ncs_start = 0; ncs_dataa = 0;
    repeat (3) @(posedge ncs_clk);
    ncs_reset = 0;
    v = rand_pos(120, 130);
    call(F, F, F); call(F, F, T); call(F, T, T); call(T, T, T);
    call(F, F, v); call(F, T, v); call(T, T, v);
    call(F, v, v); call(T, v, v); call(v, v, v);
    for (int i = 0; i < 400; i++) call(pick(), pick(), pick());
    $display("start-to-done cycles: best %0d, worst %0d", best, worst);
    checks++;
    if (u_mem.bursts != 410) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
