// tb_gut_tree_static: self-checking testbench of the static GUT tree, for
// one, two (the default) and three layers (1, 4 and 13 gates), with random
// mixes of False, True, U and finite inputs loaded group by group.
`timescale 1ns/1ps
module tb_gut_tree_static;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  bit f1, f2, f3;

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  tb_tree_harness #(.LAYERS(1)) h1 (.clk, .finished(f1));
  tb_tree_harness #(.LAYERS(2)) h2 (.clk, .finished(f2));
  tb_tree_harness #(.LAYERS(3)) h3 (.clk, .finished(f3));

  initial begin
    wait (f1 && f2 && f3);
    checks   = h1.checks + h2.checks + h3.checks;
    failures = failures + h1.failures + h2.failures + h3.failures;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
