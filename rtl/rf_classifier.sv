// rf_classifier: random-forest classifier of the MDM.
//
// Each reported instruction comes with the six hit-rate features. The forest
// of NT trees (rf_tree, DEPTH levels each) classifies it; the instruction is
// predicted malicious when a strict majority of the trees vote malicious
// (a tie counts as benign; the vote rule is this design's choice). The
// default size, 10 trees of depth 10 on 16-bit features, is the model the
// document selects for the FPGA.
//
// Classification reuse: with the program counter left out of the features,
// consecutive instructions very often carry identical feature vectors, and
// the same vector always gets the same answer. The classifier therefore
// only starts the trees when the vector differs from the previous
// instruction's (in_eval); for an unchanged vector it repeats the result of
// the last evaluated instruction. This follows the document's motivation for
// dropping the PC; the comparator that implements it is this design's own.
//
// Interface and timing: one instruction per cycle may enter (in_valid). Its
// result leaves in order, DEPTH+1 cycles later, on out_valid/out_mal;
// out_eval tells whether it came from a fresh tree evaluation. Tree nodes
// are loaded through cfg_* (cfg_tree selects the tree). clear forgets the
// previous vector and result (program start).
module rf_classifier
  import mdm_pkg::*;
#(
  parameter int NT     = 10,
  parameter int DEPTH  = 10,
  parameter int TREE_W = (NT > 1) ? $clog2(NT) : 1,
  parameter int LVL_W  = $clog2(DEPTH + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  // model loading
  input  logic              cfg_we,
  input  logic [TREE_W-1:0] cfg_tree,
  input  logic [LVL_W-1:0]  cfg_level,
  input  logic [DEPTH-1:0]  cfg_idx,
  input  node_t             cfg_node,
  // classification
  input  logic              in_valid,
  input  feat_vec_t         feats,
  output logic              in_eval,
  output logic              out_valid,
  output logic              out_mal,
  output logic              out_eval
);

  localparam int VOTE_W = $clog2(NT + 1);

  // ---------------------------------------------------------------- reuse
  feat_vec_t last_feats;
  logic      have_last;

  assign in_eval = in_valid && (!have_last || (feats != last_feats));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      have_last  <= 1'b0;
      last_feats <= '0;
    end else if (clear) begin
      have_last  <= 1'b0;
    end else if (in_valid) begin
      have_last  <= 1'b1;
      last_feats <= feats;
    end
  end

  // --------------------------------------------- shared feature pipeline
  feat_vec_t fp [DEPTH+1];
  logic      sv [1:DEPTH+1];   // instruction present in stage
  logic      se [1:DEPTH+1];   // ... and it is being evaluated

  assign fp[0] = feats;

  for (genvar k = 0; k < DEPTH + 1; k++) begin : g_pipe
    logic v_in, e_in;
    if (k == 0) begin : g_first
      assign v_in = in_valid && !clear;
      assign e_in = in_eval && !clear;
    end else begin : g_next
      assign v_in = sv[k];
      assign e_in = se[k];
    end
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        sv[k+1] <= 1'b0;
        se[k+1] <= 1'b0;
      end else begin
        sv[k+1] <= v_in;
        se[k+1] <= e_in;
      end
    end
    if (k < DEPTH) begin : g_feat
      always_ff @(posedge clk) begin
        if (e_in) fp[k+1] <= fp[k];
      end
    end
  end

  // ---------------------------------------------------------------- trees
  logic [NT-1:0] t_valid, t_cls;

  for (genvar t = 0; t < NT; t++) begin : g_tree
    rf_tree #(.DEPTH(DEPTH), .LVL_W(LVL_W)) u_tree (
      .clk       (clk),
      .rst_n     (rst_n),
      .cfg_we    (cfg_we && (int'(cfg_tree) == t)),
      .cfg_level (cfg_level),
      .cfg_idx   (cfg_idx),
      .cfg_node  (cfg_node),
      .in_valid  (in_eval && !clear),
      .feats     (fp),
      .out_valid (t_valid[t]),
      .out_cls   (t_cls[t])
    );
  end

  // ----------------------------------------------------------------- vote
  logic [VOTE_W-1:0] votes;
  logic              vote_mal;
  logic              last_mal;

  always_comb begin
    votes = '0;
    for (int t = 0; t < NT; t++) votes += VOTE_W'(t_cls[t]);
    vote_mal = (32'(votes) * 2) > NT;
  end

  assign out_valid = sv[DEPTH+1];
  assign out_eval  = se[DEPTH+1];
  assign out_mal   = se[DEPTH+1] ? vote_mal : last_mal;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                        last_mal <= 1'b0;
    else if (clear)                    last_mal <= 1'b0;
    else if (sv[DEPTH+1] && se[DEPTH+1]) last_mal <= vote_mal;
  end

  // Every tree finishes together with the sideband pipeline.
  always_ff @(posedge clk) begin
    if (rst_n) assert (t_valid == {NT{se[DEPTH+1]}})
      else $error("rf_classifier: tree pipelines out of step");
  end

endmodule
