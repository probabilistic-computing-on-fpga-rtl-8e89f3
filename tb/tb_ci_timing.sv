// tb_ci_timing: cycle-count workload of the DMA custom instructions. Runs
// the single-gate instruction and static-tree instructions of two and three
// layers (4 and 13 gates) against a memory with fixed timing (no wait
// states, no gaps), each with its best case (every input False, so every
// gate answers without arithmetic) and its worst case (every input a finite
// number, so every gate runs the full 32-cycle function). Checks:
//  - each result against the gate-by-gate reference;
//  - that the worst case costs exactly 31 cycles more per layer than the
//    best case (32 instead of 1 gate cycles in each layer), the spread the
//    reference measurements on a processor also show (about 33, 64 and 97
//    cycles for one, two and three layers);
//  - that the best case takes the same time for every call.
`timescale 1ns/1ps
module tb_ci_timing;
  import tb_fp_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;
  logic reset;
  int checks = 0, failures = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one instruction unit with its memory; L = 0 is the single gate
  logic        start[3], done[3];
  logic [31:0] dataa[3], result[3];

  for (genvar k = 0; k < 3; k++) begin : g_unit
    localparam int BCW = $clog2(3 * ((k == 0) ? 1 : 3 ** k) + 1);
    logic [31:0]    address, readdata;
    logic           read, waitrequest, readdatavalid;
    logic [BCW-1:0] burstcount;
    avalon_mem_model #(.DEPTH(64), .LATENCY(6), .MAX_WAIT(0), .GAPS(0), .BC_W(BCW)) u_mem (
      .clk, .address, .read, .burstcount, .waitrequest, .readdata, .readdatavalid
    );
    if (k == 0) begin : g_gate
      gut_ci u_ci (
        .ncs_clk(clk), .ncs_reset(reset), .ncs_clk_en(1'b1), .ncs_start(start[k]),
        .ncs_dataa(dataa[k]), .ncs_done(done[k]), .ncs_result(result[k]),
        .avm_address(address), .avm_read(read), .avm_burstcount(burstcount),
        .avm_waitrequest(waitrequest), .avm_readdata(readdata), .avm_readdatavalid(readdatavalid)
      );
    end else begin : g_tree
      gut_tree_ci #(.LAYERS(k + 1)) u_ci (
        .ncs_clk(clk), .ncs_reset(reset), .ncs_clk_en(1'b1), .ncs_start(start[k]),
        .ncs_dataa(dataa[k]), .ncs_done(done[k]), .ncs_result(result[k]),
        .avm_address(address), .avm_read(read), .avm_burstcount(burstcount),
        .avm_waitrequest(waitrequest), .avm_readdata(readdata), .avm_readdatavalid(readdatavalid)
      );
    end
  end

  task automatic put(input int k, input int i, input logic [31:0] v);
    case (k)
      0: g_unit[0].u_mem.mem[i] = v;
      1: g_unit[1].u_mem.mem[i] = v;
      default: g_unit[2].u_mem.mem[i] = v;
    endcase
  endtask

  // reference value of a full tree over n inputs
  function automatic logic [31:0] ref_tree(logic [31:0] v[27], int n);
    logic [31:0] cur[27];
    cur = v;
    while (n > 1) begin
      for (int g = 0; g < n / 3; g++) cur[g] = ref_gut(cur[3*g], cur[3*g+1], cur[3*g+2]);
      n = n / 3;
    end
    return cur[0];
  endfunction

  task automatic call(input int k, input bit worst, output int cyc);
    logic [31:0] v[27];
    int n;
    n = 3 ** (k + 1);
    foreach (v[i]) v[i] = F_ZERO;
    for (int i = 0; i < n; i++) begin
      v[i] = worst ? rand_pos(118, 136) : F_ZERO;
      put(k, i, v[i]);
    end
    @(negedge clk);
    dataa[k] = 0; start[k] = 1;
    @(negedge clk);
    start[k] = 0;
    cyc = 1;
    while (!done[k] && cyc < 2000) begin
      @(negedge clk);
      cyc++;
    end
    checks++;
    if (result[k] !== ref_tree(v, n)) begin
      failures++;
      $display("layers %0d: result %h, expected %h", k + 1, result[k], ref_tree(v, n));
    end
    @(negedge clk);
  endtask

  initial begin
    int best, worst, c;
    reset = 1;
    foreach (start[k]) begin start[k] = 0; dataa[k] = 0; end
    repeat (3) @(posedge clk);
    reset = 0;
    for (int k = 0; k < 3; k++) begin
      call(k, 0, best);
      for (int t = 0; t < 4; t++) begin
        call(k, 0, c);
        checks++;
        if (c != best) begin
          failures++;
          $display("layers %0d: best case took %0d, earlier %0d", k + 1, c, best);
        end
        call(k, 1, worst);
      end
      $display("layers %0d: best %0d cycles, worst %0d cycles, spread %0d", k + 1, best, worst, worst - best);
      checks++;
      if (worst - best != 31 * (k + 1)) begin
        failures++;
        $display("layers %0d: spread %0d, expected %0d", k + 1, worst - best, 31 * (k + 1));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
