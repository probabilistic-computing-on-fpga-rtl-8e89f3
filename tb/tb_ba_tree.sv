// tb_ba_tree: self-checking testbench of the Bayesian-algebra operator tree.
// Applies random input sets (finite values, False and True) and holds each
// for the tree latency; checks that the result equals the reference
// (in1+in2+in3)/(in3*in4) 20 cycles after the inputs change, and that one
// cycle earlier the output still mixes in the previous input set (a marker
// set is held before each new set), as the unbalanced paths imply.
`timescale 1ns/1ps
module tb_ba_tree;
  import tb_fp_pkg::*;
  localparam int LAT = 20;

  logic clock = 0;
  logic clock_enable;
  logic [31:0] input1, input2, input3, input4, result;
  int checks = 0, failures = 0;

  ba_tree dut (.*);

  always #5 clock = ~clock;

  initial begin
    repeat (200000) @(posedge clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] pick();
    case ($urandom_range(7))
      0: return F_ZERO;
      1: return F_INF;
      default: return rand_pos(110, 140);
    endcase
  endfunction

  initial begin
    logic [31:0] v[4], e, m, mixed;
    clock_enable = 1;
    // marker: (1+1+1)/(1*1) = 3
    input1 = F_ONE; input2 = F_ONE; input3 = F_ONE; input4 = F_ONE;
    m = 32'h4040_0000;
    repeat (LAT + 2) @(negedge clock);
    for (int t = 0; t < 300; t++) begin
      foreach (v[i]) v[i] = pick();
      e = ref_ba_div(ref_ba_add(ref_ba_add(v[0], v[1]), v[2]), ref_ba_mult(v[2], v[3]));
      @(negedge clock);
      input1 = v[0]; input2 = v[1]; input3 = v[2]; input4 = v[3];
      repeat (LAT - 1) @(negedge clock);
      // one cycle early the first adder's contribution is still the
      // marker's 1+1 (there are no balancing registers)
      mixed = ref_ba_div(ref_ba_add(32'h4000_0000, v[2]), ref_ba_mult(v[2], v[3]));
      if (mixed !== e) begin
        checks++;
        if (result !== mixed) begin
          failures++;
          $display("cycle %0d: %h, expected %h", LAT - 1, result, mixed);
        end
      end
      @(negedge clock);
      checks++;
      if (result !== e) begin
        failures++;
        if (failures < 10) $display("tree(%h,%h,%h,%h) = %h, expected %h", v[0], v[1], v[2], v[3], result, e);
      end
      // back to the marker
      input1 = F_ONE; input2 = F_ONE; input3 = F_ONE; input4 = F_ONE;
      repeat (LAT + 1) @(negedge clock);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
