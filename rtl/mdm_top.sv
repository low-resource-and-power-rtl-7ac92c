// mdm_top: malware detection mechanism (MDM) driven by processor information.
//
// The MDM sits beside a RISC-V core and decides, instruction by instruction,
// whether the running program behaves like malware. Per reported
// instruction it receives the program counter and the L1 instruction- and
// data-cache access/hit signals. The datapath, one instruction per cycle:
//
//   access_hit_counter  six 32-bit access/hit counter pairs (total, kernel
//                       and user mode for each cache), normalised to 8-bit
//                       entry points, plus an access flag per pair that is
//                       set only when the entry point changed;       1 cycle
//   hrtable x 6         hit-rate tables (right half only) read only when
//                       their access flag is set: six 16-bit features;  1 cycle
//   rf_classifier       10-tree random forest, trees only started when the
//                       feature vector changed;                 DEPTH+1 cycles
//   pmi_judge           malicious-instruction rate per WINDOW instructions
//                       against a 30 % threshold; sticky malware flag.
//
// The structure, the six features, the entry-point normalisation, the
// reduced table, both access-control mechanisms and the forest size follow
// the document. The kernel-area boundary, the interval length, the vote
// rule and the model-loading port are this design's choices. The trained
// forest is not fixed in the RTL: it is loaded through cfg_* before use.
//
// Interface: instruction information on info_valid/pc/ic_*/dc_*; clear
// restarts all statistics at program start. Per-instruction results leave
// on instr_valid/instr_mal DEPTH+3 cycles after the instruction entered.
// hrt_read and clf_eval show, per cycle, which tables were read and whether
// the forest was started; instr_eval marks a verdict that came from a fresh
// forest evaluation rather than a reused one. They serve activity (power)
// accounting. The raw 32-bit counters stay internal.
module mdm_top
  import mdm_pkg::*;
#(
  parameter int              PC_W        = 64,
  parameter logic [PC_W-1:0] KERNEL_BASE = 64'hFFFF_FFC0_0000_0000,
  parameter int              NT          = 10,
  parameter int              DEPTH       = 10,
  parameter int              WINDOW      = 10000,
  parameter int              THRESH_PCT  = 30,
  parameter int              TREE_W      = (NT > 1) ? $clog2(NT) : 1,
  parameter int              LVL_W       = $clog2(DEPTH + 1),
  parameter int              WCNT_W      = $clog2(WINDOW + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  // processor information, one instruction per cycle
  input  logic              info_valid,
  input  logic [PC_W-1:0]   pc,
  input  logic              ic_acc,
  input  logic              ic_hit,
  input  logic              dc_acc,
  input  logic              dc_hit,
  // random-forest model loading
  input  logic              cfg_we,
  input  logic [TREE_W-1:0] cfg_tree,
  input  logic [LVL_W-1:0]  cfg_level,
  input  logic [DEPTH-1:0]  cfg_idx,
  input  node_t             cfg_node,
  // features and per-instruction classification
  output feat_vec_t         feats,
  output logic              feats_valid,
  output logic              instr_valid,
  output logic              instr_mal,
  // program verdict
  output logic              win_done,
  output logic [WCNT_W-1:0] win_mal,
  output logic              win_over,
  output logic              malware,
  // activity
  output logic [NUM_FEAT-1:0] hrt_read,
  output logic              clf_eval,
  output logic              instr_eval
);

  logic                      ahc_valid;
  ent_t  [NUM_FEAT-1:0]      a_shr, h_shr;
  logic  [NUM_FEAT-1:0]      upd;

  access_hit_counter #(.PC_W(PC_W), .KERNEL_BASE(KERNEL_BASE)) u_ahc (
    .clk        (clk),
    .rst_n      (rst_n),
    .clear      (clear),
    .info_valid (info_valid),
    .pc         (pc),
    .ic_acc     (ic_acc),
    .ic_hit     (ic_hit),
    .dc_acc     (dc_acc),
    .dc_hit     (dc_hit),
    .valid_q    (ahc_valid),
    .a_shr      (a_shr),
    .h_shr      (h_shr),
    .upd        (upd),
    .a_cnt      (),
    .h_cnt      ()
  );

  assign hrt_read = upd;

  for (genvar f = 0; f < NUM_FEAT; f++) begin : g_hrt
    hrtable u_hrt (
      .clk   (clk),
      .rst_n (rst_n),
      .en    (upd[f]),
      .a_shr (a_shr[f]),
      .h_shr (h_shr[f]),
      .rate  (feats[f])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) feats_valid <= 1'b0;
    else        feats_valid <= ahc_valid && !clear;
  end

  rf_classifier #(.NT(NT), .DEPTH(DEPTH), .TREE_W(TREE_W), .LVL_W(LVL_W)) u_clf (
    .clk       (clk),
    .rst_n     (rst_n),
    .clear     (clear),
    .cfg_we    (cfg_we),
    .cfg_tree  (cfg_tree),
    .cfg_level (cfg_level),
    .cfg_idx   (cfg_idx),
    .cfg_node  (cfg_node),
    .in_valid  (feats_valid),
    .feats     (feats),
    .in_eval   (clf_eval),
    .out_valid (instr_valid),
    .out_mal   (instr_mal),
    .out_eval  (instr_eval)
  );

  pmi_judge #(.WINDOW(WINDOW), .THRESH_PCT(THRESH_PCT), .CNT_W(WCNT_W)) u_judge (
    .clk      (clk),
    .rst_n    (rst_n),
    .clear    (clear),
    .in_valid (instr_valid),
    .in_mal   (instr_mal),
    .win_done (win_done),
    .win_mal  (win_mal),
    .win_over (win_over),
    .malware  (malware)
  );

endmodule
