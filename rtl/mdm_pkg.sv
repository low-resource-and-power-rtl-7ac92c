// mdm_pkg: types and constants shared by the malware detection mechanism (MDM).
//
// The MDM watches a processor's L1 instruction- and data-cache access/hit
// signals, turns them into six cache hit rates (total, kernel-mode and
// user-mode, for each cache) and classifies every retired instruction with a
// random forest. This package fixes the widths that all blocks agree on:
//   * 32-bit cumulative access and hit counters,
//   * 8-bit table entry points (normalised counters),
//   * 16-bit hit rates, which are also the random-forest feature width,
//   * the order of the six feature values,
//   * the layout of one decision-tree node as stored in the classifier.
// The counter, entry-point and feature widths follow the document; the node
// layout is this design's own.
package mdm_pkg;

  localparam int CNT_W  = 32;  // cumulative access / hit counters
  localparam int ENT_W  = 8;   // HRTable entry point (normalised counter)
  localparam int RATE_W = 16;  // hit rate and random-forest feature width
  localparam int NUM_FEAT = 6; // feature values fed to the classifier
  localparam int FIDX_W = 3;   // bits to select one feature

  typedef logic [CNT_W-1:0]  cnt_t;
  typedef logic [ENT_W-1:0]  ent_t;
  typedef logic [RATE_W-1:0] rate_t;

  // Feature order, as listed in the feature table without the program counter.
  typedef enum logic [FIDX_W-1:0] {
    F_TOTAL_I = 3'd0,  // total instruction-cache hit rate
    F_TOTAL_D = 3'd1,  // total data-cache hit rate
    F_KERN_I  = 3'd2,  // instruction-cache hit rate, PC in kernel area
    F_KERN_D  = 3'd3,  // data-cache hit rate, instruction in kernel mode
    F_USER_I  = 3'd4,  // instruction-cache hit rate, PC in user area
    F_USER_D  = 3'd5   // data-cache hit rate, instruction in user mode
  } feat_e;

  typedef rate_t [NUM_FEAT-1:0] feat_vec_t;

  // One node of a decision tree. An inner node sends the instruction to its
  // left child when feature[feat] <= thr, otherwise to its right child. A leaf
  // ends the walk and gives the class (1 = malicious).
  typedef struct packed {
    logic                  leaf;
    logic                  cls;
    logic [FIDX_W-1:0]     feat;
    logic [RATE_W-1:0]     thr;
  } node_t;

endpackage
