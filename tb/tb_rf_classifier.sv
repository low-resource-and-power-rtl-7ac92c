// tb_rf_classifier: self-checking test of the random-forest classifier at
// its default size (10 trees, depth 10).
//
// A random forest is loaded through the configuration port. Feature
// vectors are drawn from a small pool and often repeat the previous one, so
// both paths are exercised: fresh evaluation through all trees, and reuse
// of the last result for an unchanged vector. Every result is compared, in
// order and exactly DEPTH+1 cycles after its input, with a majority vote
// computed by walking the same trees in the testbench; the eval flags and
// the count of evaluations are checked against the number of vector
// changes. A clear in the middle must force a fresh evaluation.
module tb_rf_classifier;
  import mdm_pkg::*;

  localparam int NT     = 10;
  localparam int DEPTH  = 10;
  localparam int TREE_W = $clog2(NT);
  localparam int LVL_W  = $clog2(DEPTH + 1);
  localparam int NN     = (1 << (DEPTH + 1)) - 1;

  logic              clk = 1'b0;
  logic              rst_n, clear, cfg_we, in_valid, in_eval, out_valid, out_mal, out_eval;
  logic [TREE_W-1:0] cfg_tree;
  logic [LVL_W-1:0]  cfg_level;
  logic [DEPTH-1:0]  cfg_idx;
  node_t             cfg_node;
  feat_vec_t         feats;
  int                checks = 0, failures = 0;

  rf_classifier dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

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

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Reference pipeline of expected results.
  bit        exp_v [$], exp_e [$], exp_m [$];
  feat_vec_t prev;
  bit        have_prev = 0;
  int        n_eval_ref = 0, n_eval_dut = 0, n_reuse = 0, n_mal = 0;

  always @(posedge clk) begin
    if (rst_n) begin
      bit e;
      e = in_valid && !clear && (!have_prev || feats != prev);
      exp_v.push_back(in_valid && !clear);
      exp_e.push_back(e);
      exp_m.push_back(in_valid ? forest(feats) : 1'b0);
      check(in_eval == (in_valid && (!have_prev || feats != prev)), "in_eval");
      if (clear) have_prev = 0;
      else if (in_valid) begin prev = feats; have_prev = 1; end
      if (e) n_eval_ref++;
      if (exp_v.size() > DEPTH + 1) begin
        bit ev, ee, em;
        ev = exp_v.pop_front(); ee = exp_e.pop_front(); em = exp_m.pop_front();
        check(out_valid == ev, "out_valid timing");
        if (ev) begin
          check(out_eval == ee, "out_eval");
          check(out_mal == em, "out_mal");
          if (out_eval) n_eval_dut++; else n_reuse++;
          if (out_mal) n_mal++;
        end
      end
    end
  end

  feat_vec_t pool [8];

  initial begin
    rst_n = 1'b0; clear = 1'b0; cfg_we = 1'b0; in_valid = 1'b0; feats = '0;
    cfg_tree = '0; cfg_level = '0; cfg_idx = '0; cfg_node = '0;
    for (int p = 0; p < 8; p++)
      for (int f = 0; f < NUM_FEAT; f++) pool[p][f] = rate_t'($urandom);
    repeat (2) @(posedge clk);
    #1;
    for (int t = 0; t < NT; t++)
      for (int lvl = 0; lvl <= DEPTH; lvl++)
        for (int j = 0; j < (1 << lvl); j++) begin
          node_t n;
          n.leaf = (lvl == DEPTH) || (lvl >= 2 && $urandom_range(0, 4) == 0);
          n.cls  = 1'($urandom);
          n.feat = 3'($urandom_range(0, NUM_FEAT - 1));
          n.thr  = rate_t'($urandom);
          model[t][(1 << lvl) - 1 + j] = n;
          cfg_we = 1'b1; cfg_tree = TREE_W'(t); cfg_level = LVL_W'(lvl);
          cfg_idx = DEPTH'(j); cfg_node = n;
          @(posedge clk); #1;
        end
    cfg_we = 1'b0;
    rst_n = 1'b1;
    for (int i = 0; i < 20_000; i++) begin
      in_valid = ($urandom_range(0, 4) != 0);
      if ($urandom_range(0, 9) < 4) feats = pool[$urandom_range(0, 7)];
      clear = (i == 10_000);
      @(posedge clk); #1;
    end
    in_valid = 1'b0; clear = 1'b0;
    repeat (DEPTH + 3) @(posedge clk);
    #1;
    check(n_eval_dut == n_eval_ref, "number of evaluations");
    check(n_reuse > 1000 && n_eval_dut > 1000, "both evaluation and reuse exercised");
    check(n_mal > 0 && n_mal < n_eval_dut + n_reuse, "both classes seen");
    $display("evaluated %0d, reused %0d, malicious %0d", n_eval_dut, n_reuse, n_mal);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
