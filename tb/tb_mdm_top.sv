// tb_mdm_top: end-to-end test of the malware detection mechanism at its
// default parameters (10 trees of depth 10, 10,000-instruction intervals).
//
// A forest is loaded whose trees all split first on the user-mode
// data-cache hit rate: below 50 % their leaves mostly vote malicious, above
// it mostly benign; deeper nodes test random features. Two synthetic
// programs are then run, one instruction per cycle with occasional idle
// cycles, each for two intervals and separated by a clear:
//   * "benign":  high instruction- and data-cache hit ratios,
//   * "malware": data-cache hit ratio around 25 %.
// Both mix user-area and kernel-area program counters.
//
// The testbench keeps its own model of the whole datapath (counters,
// entry-point normalisation, hit rate by floating-point division, forest
// walk, majority vote, interval count) and checks the six features of every
// instruction, every per-instruction verdict and its latency (DEPTH+3
// cycles), every interval result and the final malware flag: clear for the
// benign program, set for the malware program. It also counts how often
// each mechanism acted (table read and skipped, removed left-half entry
// points, forest evaluated and reused, kernel and user instructions,
// intervals over and under the threshold, clear) and fails any that never
// did. Finally it reports the fraction of table reads and forest starts
// saved by access control.
module tb_mdm_top;
  import mdm_pkg::*;

  localparam int PC_W   = 64;
  localparam int NT     = 10;
  localparam int DEPTH  = 10;
  localparam int WINDOW = 10000;
  localparam int TREE_W = $clog2(NT);
  localparam int LVL_W  = $clog2(DEPTH + 1);
  localparam int WCNT_W = $clog2(WINDOW + 1);
  localparam int NN     = (1 << (DEPTH + 1)) - 1;
  localparam int LAT    = DEPTH + 3;

  logic                clk = 1'b0;
  logic                rst_n, clear, info_valid, ic_acc, ic_hit, dc_acc, dc_hit;
  logic [PC_W-1:0]     pc;
  logic                cfg_we;
  logic [TREE_W-1:0]   cfg_tree;
  logic [LVL_W-1:0]    cfg_level;
  logic [DEPTH-1:0]    cfg_idx;
  node_t               cfg_node;
  feat_vec_t           feats;
  logic                feats_valid, instr_valid, instr_mal, win_done, win_over, malware, clf_eval, instr_eval;
  logic [WCNT_W-1:0]   win_mal;
  logic [NUM_FEAT-1:0] hrt_read;
  int                  checks = 0, failures = 0;

  mdm_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // ------------------------------------------------------------ reference
  node_t model [NT][NN];

  function automatic bit walk(input int t, input feat_vec_t f);
    int i = 0;
    for (int lvl = 0; lvl <= DEPTH; lvl++) begin
      if (model[t][i].leaf || lvl == DEPTH) return model[t][i].cls;
      i = (f[model[t][i].feat] > model[t][i].thr) ? 2 * i + 2 : 2 * i + 1;
    end
    return 1'b0;
  endfunction

  function automatic bit forest(input feat_vec_t f);
    int v = 0;
    for (int t = 0; t < NT; t++) v += walk(t, f);
    return (2 * v > NT);
  endfunction

  longint ra [NUM_FEAT], rh [NUM_FEAT];

  function automatic rate_t ref_rate(input longint a, input longint h);
    real r;
    while (a >= 256) begin a /= 2; h /= 2; end
    if (a < 128 || h >= a) return '0;
    r = $floor(real'(h) * 65536.0 / real'(a));
    return rate_t'(longint'(r));
  endfunction

  // Expected results in order of entry.
  feat_vec_t exp_f [$];
  bit        exp_m [$];
  longint    exp_t [$];
  longint    cyc = 0;
  int        n_win_mal = 0, n_win_instr = 0;
  int        exp_win_mal [$];

  // Mechanism counters.
  int n_read = 0, n_skip = 0, n_left = 0, n_eval = 0, n_reuse = 0;
  int n_kern = 0, n_user = 0, n_over = 0, n_under = 0, n_clear = 0, n_instr = 0;

  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      // activity of the access-control mechanisms
      if (dut.u_ahc.valid_q) begin
        for (int f = 0; f < NUM_FEAT; f++) begin
          if (hrt_read[f]) n_read++; else n_skip++;
          if (hrt_read[f] && !dut.u_ahc.a_shr[f][ENT_W-1]) n_left++;
        end
      end
      if (feats_valid) begin
        if (clf_eval) n_eval++; else n_reuse++;
        feats_f: begin
          feat_vec_t ef;
          ef = exp_f.pop_front();
          check(feats == ef, "feature vector");
          if (feats != ef && failures < 10) $display("  got %h exp %h", feats, ef);
        end
      end
      if (instr_valid) begin
        bit em;
        longint et;
        em = exp_m.pop_front();
        et = exp_t.pop_front();
        check(instr_mal == em, "instruction verdict");
        check(cyc - et == LAT, "instruction latency");
        n_instr++;
        n_win_instr++;
        if (em) n_win_mal++;
        if (n_win_instr == WINDOW) begin
          exp_win_mal.push_back(n_win_mal);
          n_win_mal = 0; n_win_instr = 0;
        end
      end
      if (win_done) begin
        int m;
        m = exp_win_mal.pop_front();
        check(int'(win_mal) == m, "interval malicious count");
        check(win_over == (m * 100 > 30 * WINDOW), "interval verdict");
        if (win_over) n_over++; else n_under++;
        $display("interval done: %0d of %0d predicted malicious (%0d %%), over=%0d",
                 win_mal, WINDOW, int'(win_mal) * 100 / WINDOW, win_over);
      end
    end
  end

  // Run one program of n instructions with the given hit ratios (percent).
  task automatic run_program(input int n, input int ih_pct, input int dh_pct);
    int sent = 0;
    while (sent < n) begin
      bit kern, ia, ih, da, dh;
      kern = ($urandom_range(0, 99) < 30);
      info_valid = ($urandom_range(0, 19) != 0);
      pc = kern ? {32'hFFFF_FFC0 + 32'($urandom_range(0, 63)), 32'($urandom)}
                : {32'h0, 32'($urandom_range(32'h1_0000, 32'h7FFF_FFFF))};
      ia = ($urandom_range(0, 99) < 95);
      ih = ($urandom_range(0, 99) < ih_pct);
      da = ($urandom_range(0, 99) < 40);
      dh = ($urandom_range(0, 99) < dh_pct);
      ic_acc = ia; ic_hit = ih; dc_acc = da; dc_hit = dh;
      if (info_valid) begin
        feat_vec_t f;
        if (kern) n_kern++; else n_user++;
        if (ia) begin
          ra[F_TOTAL_I]++; if (ih) rh[F_TOTAL_I]++;
          if (kern) begin ra[F_KERN_I]++; if (ih) rh[F_KERN_I]++; end
          else      begin ra[F_USER_I]++; if (ih) rh[F_USER_I]++; end
        end
        if (da) begin
          ra[F_TOTAL_D]++; if (dh) rh[F_TOTAL_D]++;
          if (kern) begin ra[F_KERN_D]++; if (dh) rh[F_KERN_D]++; end
          else      begin ra[F_USER_D]++; if (dh) rh[F_USER_D]++; end
        end
        for (int k = 0; k < NUM_FEAT; k++) f[k] = ref_rate(ra[k], rh[k]);
        exp_f.push_back(f);
        exp_m.push_back(forest(f));
        exp_t.push_back(cyc + 1);
        sent++;
      end
      @(posedge clk); #1;
    end
    info_valid = 1'b0;
    repeat (LAT + 3) @(posedge clk);
    #1;
  endtask

  task automatic do_clear();
    clear = 1'b1;
    @(posedge clk); #1;
    clear = 1'b0;
    for (int k = 0; k < NUM_FEAT; k++) begin ra[k] = 0; rh[k] = 0; end
    n_win_mal = 0; n_win_instr = 0;
    n_clear++;
  endtask

  initial begin
    rst_n = 1'b0; clear = 1'b0; info_valid = 1'b0; pc = '0;
    ic_acc = 0; ic_hit = 0; dc_acc = 0; dc_hit = 0;
    cfg_we = 1'b0; cfg_tree = '0; cfg_level = '0; cfg_idx = '0; cfg_node = '0;
    for (int k = 0; k < NUM_FEAT; k++) begin ra[k] = 0; rh[k] = 0; end
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    // ---- load the forest
    for (int t = 0; t < NT; t++)
      for (int lvl = 0; lvl <= DEPTH; lvl++)
        for (int j = 0; j < (1 << lvl); j++) begin
          node_t n;
          bit    low_side;
          low_side = (lvl == 0) ? 1'b0 : (j < (1 << (lvl - 1)));
          n.leaf = (lvl == DEPTH) || (lvl >= 2 && $urandom_range(0, 5) == 0);
          n.cls  = low_side ? ($urandom_range(0, 99) < 85) : ($urandom_range(0, 99) < 10);
          n.feat = (lvl == 0) ? F_USER_D : 3'($urandom_range(0, NUM_FEAT - 1));
          n.thr  = (lvl == 0) ? 16'h8000 : rate_t'($urandom);
          if (lvl == 0) n.leaf = 1'b0;
          model[t][(1 << lvl) - 1 + j] = n;
          cfg_we = 1'b1; cfg_tree = TREE_W'(t); cfg_level = LVL_W'(lvl);
          cfg_idx = DEPTH'(j); cfg_node = n;
          @(posedge clk); #1;
        end
    cfg_we = 1'b0;
    do_clear();
    // ---- benign program
    run_program(2 * WINDOW, 96, 92);
    check(!malware, "benign program not flagged");
    do_clear();
    check(!malware, "flag clear after clear");
    // ---- malware program
    run_program(2 * WINDOW, 80, 25);
    check(malware, "malware program flagged");
    // ---- mechanisms
    $display("table reads %0d, skipped %0d (%0d %% of lookups avoided), left-half entry points %0d",
             n_read, n_skip, n_skip * 100 / (n_read + n_skip), n_left);
    $display("forest evaluations %0d, reused results %0d; kernel %0d, user %0d instructions",
             n_eval, n_reuse, n_kern, n_user);
    check(n_read > 0,  "HRTable read happened");
    check(n_skip > 0,  "HRTable read skipped by access control");
    check(n_left > 0,  "entry point in removed left half");
    check(n_eval > 0,  "forest evaluation happened");
    check(n_reuse > 0, "forest result reused");
    check(n_kern > 0 && n_user > 0, "kernel and user instructions");
    check(n_over > 0,  "interval over threshold");
    check(n_under > 0, "interval under threshold");
    check(n_clear > 0, "clear");
    check(n_instr == 4 * WINDOW, "all instructions classified");
    check(exp_m.size() == 0 && exp_f.size() == 0, "no result missing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
