// tb_tree_harness: drives one static GUT tree of LAYERS layers directly on its
// loading interface (gut_select/gut_start, with random gaps between the
// groups) and checks the tree output against a gate-by-gate reference.
// Used by tb_gut_tree_static for 1, 2 and 3 layers.
`timescale 1ns/1ps
module tb_tree_harness #(
  parameter int LAYERS = 2
) (
  input  logic clk,
  output bit   finished
);
  import tb_fp_pkg::*;
  localparam int NIN  = 3 ** LAYERS;
  localparam int NG   = (NIN - 1) / 2;
  localparam int NLF  = 3 ** (LAYERS - 1);

  int checks = 0, failures = 0;

  logic        ncs_reset, ncs_clk_en, gut_start, ncs_done;
  logic [7:0]  gut_select;
  logic [31:0] dataX, dataY, dataZ, ncs_result;

  gut_tree_static #(.LAYERS(LAYERS)) dut (.ncs_clk(clk), .*);

  function automatic logic [31:0] pick();
    case ($urandom_range(6))
      0: return F_ZERO;
      1: return F_INF;
      2: return F_ONE;
      default: return rand_pos(118, 136);
    endcase
  endfunction

  function automatic logic [31:0] tree_ref(logic [31:0] in [NIN]);
    logic [31:0] cur [NIN];
    int n;
    cur = in;
    n = NIN;
    while (n > 1) begin
      for (int i = 0; i < n / 3; i++) cur[i] = ref_gut(cur[3*i], cur[3*i+1], cur[3*i+2]);
      n = n / 3;
    end
    return cur[0];
  endfunction

  // catch the done pulse wherever it falls
  bit          got_done;
  logic [31:0] got_result;
  always @(posedge clk) if (ncs_done) begin
    got_done   <= 1;
    got_result <= ncs_result;
  end

  initial begin
    logic [31:0] in [NIN];
    logic [31:0] e;
    int cyc;
    finished = 0;
    ncs_reset = 1; ncs_clk_en = 1; gut_start = 0; gut_select = 0;
    dataX = 0; dataY = 0; dataZ = 0;
    repeat (3) @(posedge clk);
    ncs_reset = 0;
    for (int t = 0; t < 150; t++) begin
      foreach (in[i]) in[i] = pick();
      if (t % 3 == 0) foreach (in[i]) in[i] = rand_pos(118, 136);
      e = tree_ref(in);
      got_done = 0;
      for (int g = 0; g < NLF; g++) begin
        @(negedge clk);
        dataX = in[3*g]; dataY = in[3*g+1]; dataZ = in[3*g+2];
        gut_select = 8'(g + 1); gut_start = 1;
        @(negedge clk);
        gut_start = 0;
        dataX = 32'hDEAD_BEEF; dataY = 32'hDEAD_BEEF; dataZ = 32'hDEAD_BEEF;
        repeat ($urandom_range(2)) @(negedge clk);
      end
      cyc = 0;
      while (!got_done && cyc < 2000) begin
        @(negedge clk);
        cyc++;
      end
      checks++;
      if (!got_done || got_result !== e) begin
        failures++;
        if (failures < 10) $display("L=%0d tree result %h (done %b), expected %h", LAYERS, got_result, got_done, e);
      end
      repeat (2) @(negedge clk);
    end
    finished = 1;
  end
endmodule
