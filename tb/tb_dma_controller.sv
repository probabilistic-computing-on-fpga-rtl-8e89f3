// tb_dma_controller: self-checking testbench of the DMA custom-instruction
// front end. A behavioural Avalon burst memory (random waitrequest, latency
// and gaps) holds the input words; a small accelerator model records every
// gut_start with its select value and operands and answers done some cycles
// after the last group with a result derived from what it received. Checks
// the burst length, that each group arrives with the right select value and
// words, that the result comes back with ncs_done, and the clock-enable
// qualification of the handshake. Runs with 1 and with 3 groups.
`timescale 1ns/1ps
module tb_dma_controller;
  int checks = 0, failures = 0;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic clk = 0;
  always #5 clk = ~clk;

  bit   done1 = 0, done3 = 0;

  tb_dma_harness #(.N_GROUPS(1)) h1 (.clk, .finished(done1));
  tb_dma_harness #(.N_GROUPS(3)) h3 (.clk, .finished(done3));

  initial begin
    wait (done1 && done3);
    checks   = h1.checks + h3.checks;
    failures = failures + h1.failures + h3.failures;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
