// tb_dma_harness: one DMA controller with its memory model and a behavioural
// accelerator, driven through a number of custom-instruction calls; used by
// tb_dma_controller for several group counts.
`timescale 1ns/1ps
module tb_dma_harness #(
  parameter int N_GROUPS = 1
) (
  input  logic clk,
  output bit   finished
);
  localparam int NW   = 3 * N_GROUPS;
  localparam int BC_W = $clog2(NW + 1);

  int checks = 0, failures = 0;

  logic        ncs_reset, ncs_clk_en, ncs_start, ncs_done;
  logic [31:0] ncs_dataa, ncs_result;
  logic [31:0] avm_address, avm_readdata;
  logic        avm_read, avm_waitrequest, avm_readdatavalid;
  logic [BC_W-1:0] avm_burstcount;
  logic [31:0] dataX, dataY, dataZ, acc_result;
  logic [7:0]  gut_select;
  logic        gut_start, acc_done;

  dma_controller #(.N_GROUPS(N_GROUPS)) dut (.ncs_clk(clk), .*);

  avalon_mem_model #(.DEPTH(256), .LATENCY(4), .BC_W(BC_W)) u_mem (
    .clk, .address(avm_address), .read(avm_read), .burstcount(avm_burstcount),
    .waitrequest(avm_waitrequest), .readdata(avm_readdata), .readdatavalid(avm_readdatavalid)
  );

  // accelerator model: remembers what each start delivered
  logic [31:0] got [N_GROUPS][3];
  int          starts;
  logic [31:0] acc_sum;
  int          done_delay;

  always @(posedge clk) begin
    acc_done <= 0;
    if (gut_start) begin
      if (gut_select >= 1 && gut_select <= N_GROUPS) begin
        got[gut_select-1][0] = dataX;
        got[gut_select-1][1] = dataY;
        got[gut_select-1][2] = dataZ;
      end
      starts++;
      acc_sum = acc_sum + dataX + dataY * 3 + dataZ * 5 + 32'(gut_select);
      if (starts == N_GROUPS) done_delay = 2 + int'($urandom_range(10));
    end else if (done_delay > 0) begin
      done_delay--;
      if (done_delay == 0) begin
        acc_done   <= 1;
        acc_result <= acc_sum;
      end
    end
  end

  initial begin
    int base, cyc;
    logic [31:0] exp_sum;
    finished = 0;
    ncs_reset = 1; ncs_clk_en = 1; ncs_start = 0; ncs_dataa = 0;
    acc_done = 0; acc_result = 0; done_delay = 0;
    repeat (3) @(posedge clk);
    ncs_reset = 0;
    for (int call = 0; call < 40; call++) begin
      base = int'($urandom_range(200));
      for (int i = 0; i < NW; i++) u_mem.mem[base + i] = $urandom;
      starts = 0; acc_sum = 0;
      @(negedge clk);
      // sometimes hold clk_en low around the start: the call must wait
      ncs_clk_en = (call % 4 != 3);
      ncs_dataa = 32'(base * 4); ncs_start = 1;
      @(negedge clk);
      if (!ncs_clk_en) begin
        checks++;
        if (avm_read) failures++;        // not taken while disabled
        ncs_clk_en = 1;
        @(negedge clk);
      end
      ncs_start = 0;
      cyc = 0;
      while (!ncs_done && cyc < 500) begin
        @(negedge clk);
        cyc++;
      end
      exp_sum = 0;
      for (int g = 0; g < N_GROUPS; g++) begin
        for (int k = 0; k < 3; k++) begin
          checks++;
          if (got[g][k] !== u_mem.mem[base + 3*g + k]) begin
            failures++;
            $display("group %0d word %0d: %h, expected %h", g, k, got[g][k], u_mem.mem[base + 3*g + k]);
          end
        end
        exp_sum = exp_sum + u_mem.mem[base+3*g] + u_mem.mem[base+3*g+1] * 3
                + u_mem.mem[base+3*g+2] * 5 + 32'(g + 1);
      end
      checks += 2;
      if (starts != N_GROUPS) begin
        failures++;
        $display("%0d starts, expected %0d", starts, N_GROUPS);
      end
      if (!ncs_done || ncs_result !== exp_sum) begin
        failures++;
        $display("done %b result %h, expected %h", ncs_done, ncs_result, exp_sum);
      end
      // done is held while clk_en is low
      if (call % 5 == 4) begin
        ncs_clk_en = 0;
        repeat (3) @(negedge clk);
        checks++;
        if (!ncs_done) failures++;
        ncs_clk_en = 1;
      end
      @(negedge clk);
    end
    checks++;
    if (u_mem.bursts != 40) begin
      failures++;
      $display("%0d bursts, expected 40", u_mem.bursts);
    end
    finished = 1;
  end
endmodule
