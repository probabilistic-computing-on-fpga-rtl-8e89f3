// ba_tree: a tree of Bayesian-algebra operators wired for one fixed function,
//     result = (input1 + input2 + input3) / (input3 * input4),
// with two adders in series, a multiplier beside them and a divider at the
// root. Like a dynamically generated GUT tree it computes only the function
// it was built for, but with the specific operators instead of general
// gates, so it needs less logic.
//
// The operators are pipelines (add 7, multiply 5, divide 6 cycles) and the
// inputs go straight to them, as drawn in the source design: there are no
// balancing registers, so the result is valid LATENCY = 7 + 7 + 6 = 20
// enabled cycles after the inputs last changed, with the inputs held stable
// meanwhile. clock_enable freezes every operator.
module ba_tree
  import ba_pkg::*;
#(
  parameter int unsigned ADD_CLOCKS  = 7,
  parameter int unsigned MULT_CLOCKS = 5,
  parameter int unsigned DIV_CLOCKS  = 6
) (
  input  logic   clock,
  input  logic   clock_enable,
  input  float_t input1,
  input  float_t input2,
  input  float_t input3,
  input  float_t input4,
  output float_t result
);

  float_t sum12, sum123, prod34;

  ba_add #(.LATENCY(ADD_CLOCKS)) u_add1 (
    .clock, .clk_en(clock_enable), .dataa(input1), .datab(input2), .result(sum12)
  );

  ba_add #(.LATENCY(ADD_CLOCKS)) u_add2 (
    .clock, .clk_en(clock_enable), .dataa(sum12), .datab(input3), .result(sum123)
  );

  ba_mult #(.LATENCY(MULT_CLOCKS)) u_mult (
    .clock, .clk_en(clock_enable), .dataa(input3), .datab(input4), .result(prod34)
  );

  ba_div #(.LATENCY(DIV_CLOCKS)) u_div (
    .clock, .clk_en(clock_enable), .dataa(sum123), .datab(prod34), .result(result)
  );

endmodule
