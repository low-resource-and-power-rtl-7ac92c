// rf_tree: one decision tree of the random-forest classifier, pipelined so
// that a new instruction can enter every cycle.
//
// The tree is stored as a complete binary tree, one node memory per level:
// level k holds 2^k nodes and node i of level k has children 2i and 2i+1 of
// level k+1. Level k is evaluated in pipeline stage k: it reads the node the
// instruction has reached, and either ends the walk at a leaf (taking its
// class) or compares one feature with the node's threshold and moves left
// (feature <= threshold) or right. A node of the last level (DEPTH) is
// always treated as a leaf. Once a leaf is reached the result rides through
// the remaining stages unchanged.
//
// The document gives the forest's size (depth 10, 16-bit features) and that
// the trained model is placed in hardware; it does not give a trained model.
// This design therefore makes the nodes writable through a configuration
// port (cfg_*), one node per cycle, and evaluates whatever model is loaded.
//
// Interface: in_valid starts a walk with the feature vector feats[0]; the
// caller supplies in feats[k] the feature vector of the instruction that is
// in stage k, so the feature pipeline can be shared by all trees. out_valid
// and out_cls appear DEPTH+1 cycles after in_valid. Stages without a valid
// instruction do not read their node memory.
module rf_tree
  import mdm_pkg::*;
#(
  parameter int DEPTH = 10,
  parameter int LVL_W = $clog2(DEPTH + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  // model loading
  input  logic             cfg_we,
  input  logic [LVL_W-1:0] cfg_level,
  input  logic [DEPTH-1:0] cfg_idx,
  input  node_t            cfg_node,
  // classification
  input  logic             in_valid,
  input  feat_vec_t        feats [DEPTH+1],
  output logic             out_valid,
  output logic             out_cls
);

  // State entering level k, registered for k = 1 .. DEPTH+1.
  logic             r_v    [1:DEPTH+1];
  logic             r_done [1:DEPTH+1];
  logic             r_cls  [1:DEPTH+1];
  logic [DEPTH-1:0] r_idx  [1:DEPTH+1];

  for (genvar k = 0; k <= DEPTH; k++) begin : g_lvl
    localparam int N = 1 << k;
    node_t            mem [N];
    node_t            node;
    logic             lv_v, lv_done, lv_cls;
    logic [DEPTH-1:0] lv_idx;
    rate_t            fval;
    logic             go_right;

    if (k == 0) begin : g_in
      assign lv_v    = in_valid;
      assign lv_done = 1'b0;
      assign lv_cls  = 1'b0;
      assign lv_idx  = '0;
      assign node    = mem[0];
      always_ff @(posedge clk) begin
        if (cfg_we && (cfg_level == '0)) mem[0] <= cfg_node;
      end
    end else begin : g_reg
      assign lv_v    = r_v[k];
      assign lv_done = r_done[k];
      assign lv_cls  = r_cls[k];
      assign lv_idx  = r_idx[k];
      assign node    = mem[lv_idx[k-1:0]];
      always_ff @(posedge clk) begin
        if (cfg_we && (int'(cfg_level) == k)) mem[cfg_idx[k-1:0]] <= cfg_node;
      end
    end

    assign fval     = (int'(node.feat) < NUM_FEAT) ? feats[k][node.feat] : '0;
    assign go_right = (fval > node.thr);

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        r_v[k+1] <= 1'b0;
      end else begin
        r_v[k+1] <= lv_v;
      end
    end

    always_ff @(posedge clk) begin
      if (lv_v) begin
        if (lv_done) begin
          r_done[k+1] <= 1'b1;
          r_cls[k+1]  <= lv_cls;
          r_idx[k+1]  <= lv_idx;
        end else if (node.leaf || k == DEPTH) begin
          r_done[k+1] <= 1'b1;
          r_cls[k+1]  <= node.cls;
          r_idx[k+1]  <= lv_idx;
        end else begin
          r_done[k+1] <= 1'b0;
          r_cls[k+1]  <= 1'b0;
          r_idx[k+1]  <= DEPTH'({lv_idx, go_right});
        end
      end
    end
  end

  assign out_valid = r_v[DEPTH+1];
  assign out_cls   = r_cls[DEPTH+1];

endmodule
