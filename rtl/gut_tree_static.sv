// gut_tree_static: static GUT tree, a full ternary tree of floating-point
// Generic Bayesian Gates with LAYERS layers.
//
// The 3^(LAYERS-1) gates of the first layer take all the inputs; every other
// gate takes the outputs of three gates of the layer before, and the last
// gate gives the tree output. Which function the tree computes is decided
// only by the inputs applied (constants False, True and U included), so one
// tree serves many problems. A tree of L layers has (3^L - 1)/2 gates and
// 3^L inputs: 4 gates and 9 inputs for the default of 2 layers, 13 gates and
// 27 inputs for 3 layers.
//
// Loading: the inputs arrive three at a time on dataX/dataY/dataZ, and a
// one-cycle gut_start with gut_select = i starts first-layer gate i
// (1-based, as a decoder with outputs eq1, eq2, ... would). Each first-layer
// gate works as soon as it is loaded. Every gate of a later layer starts once
// all three of its children have reported done: their done pulses are kept
// in flags, and when all three flags are set the parent is started and the
// flags are cleared (the three-input AND of the children's done signals of
// the source design, made to work with one-cycle done pulses). ncs_done
// pulses and ncs_result is valid when the last gate finishes.
//
// ncs_clk_en freezes every gate; ncs_reset is synchronous. The number of
// layers of the drawn example (2), the select/start loading and the AND of
// the done signals follow the source design; the flag registers are this
// design's choice.
module gut_tree_static
  import ba_pkg::*;
#(
  parameter int unsigned LAYERS = 2
) (
  input  logic       ncs_clk,
  input  logic       ncs_reset,
  input  logic       ncs_clk_en,
  input  float_t     dataX,
  input  float_t     dataY,
  input  float_t     dataZ,
  input  logic [7:0] gut_select,
  input  logic       gut_start,
  output logic       ncs_done,
  output float_t     ncs_result
);

  localparam int unsigned N_GATES = (pow3(LAYERS) - 1) / 2;
  localparam int unsigned N_LEAF  = pow3(LAYERS - 1);

  // first gate index of layer k (layer 0 takes the inputs)
  function automatic int unsigned layer_base(int unsigned k);
    int unsigned b = 0;
    for (int unsigned j = 0; j < k; j++) b += pow3(LAYERS - 1 - j);
    return b;
  endfunction

  float_t gx [N_GATES];
  float_t gy [N_GATES];
  float_t gz [N_GATES];
  float_t gres  [N_GATES];
  logic   gstart[N_GATES];
  logic   gdone [N_GATES];
  logic   seen  [N_GATES];   // done reported and not yet consumed by the parent

  for (genvar g = 0; g < N_GATES; g++) begin : g_gate
    gut_fp u_gut (
      .ncs_clk, .ncs_reset, .ncs_clk_en,
      .ncs_start (gstart[g]),
      .x(gx[g]), .y(gy[g]), .z(gz[g]),
      .ncs_done  (gdone[g]),
      .ncs_result(gres[g])
    );
  end

  // first layer: loaded from the input bus
  for (genvar i = 0; i < N_LEAF; i++) begin : g_leaf
    assign gx[i] = dataX;
    assign gy[i] = dataY;
    assign gz[i] = dataZ;
    assign gstart[i] = gut_start && (gut_select == 8'(i + 1));
  end

  // later layers: fed by three children each
  for (genvar k = 1; k < LAYERS; k++) begin : g_layer
    for (genvar i = 0; i < pow3(LAYERS - 1 - k); i++) begin : g_node
      localparam int unsigned N = layer_base(k) + i;
      localparam int unsigned C = layer_base(k - 1) + 3 * i;
      assign gx[N] = gres[C];
      assign gy[N] = gres[C + 1];
      assign gz[N] = gres[C + 2];
      assign gstart[N] = seen[C] && seen[C + 1] && seen[C + 2];
    end
  end

  // done flags of every gate but the last
  for (genvar g = 0; g < N_GATES - 1; g++) begin : g_seen
    always_ff @(posedge ncs_clk) begin
      if (ncs_reset) begin
        seen[g] <= 1'b0;
      end else if (ncs_clk_en) begin
        if (gstart[parent_of(g)]) seen[g] <= 1'b0;
        else if (gdone[g])        seen[g] <= 1'b1;
      end
    end
  end
  assign seen[N_GATES-1] = 1'b0;

  function automatic int unsigned parent_of(int unsigned g);
    int unsigned k = 0;
    while (k + 1 < LAYERS && g >= layer_base(k + 1)) k++;
    return layer_base(k + 1) + (g - layer_base(k)) / 3;
  endfunction

  assign ncs_done   = gdone[N_GATES-1];
  assign ncs_result = gres[N_GATES-1];

endmodule
