// tb_rf_tree: self-checking test of one pipelined decision tree.
//
// A random tree of the default depth is written node by node through the
// configuration port: inner nodes test a random feature against a random
// threshold, about one in five inner nodes below level 1 is an early leaf, and the last
// level holds leaves. Random feature vectors are then pushed, with random
// gaps, and every result is compared with a walk of the same tree done in
// the testbench. Each result must appear exactly DEPTH+1 cycles after its
// input, and only then.
module tb_rf_tree;
  import mdm_pkg::*;

  localparam int DEPTH = 10;
  localparam int LVL_W = $clog2(DEPTH + 1);
  localparam int NN    = (1 << (DEPTH + 1)) - 1;

  logic             clk = 1'b0;
  logic             rst_n, cfg_we, in_valid, out_valid, out_cls;
  logic [LVL_W-1:0] cfg_level;
  logic [DEPTH-1:0] cfg_idx;
  node_t            cfg_node;
  feat_vec_t        feats [DEPTH+1];
  int               checks = 0, failures = 0;

  rf_tree dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  node_t model [NN];  // heap order: node i has children 2i+1, 2i+2

  function automatic bit walk(input feat_vec_t f);
    int i = 0;
    for (int lvl = 0; lvl <= DEPTH; lvl++) begin
      if (model[i].leaf || lvl == DEPTH) return model[i].cls;
      i = (f[model[i].feat] > model[i].thr) ? 2 * i + 2 : 2 * i + 1;
    end
    return 1'b0;
  endfunction

  // Feature pipeline supplied by the caller (shared by all trees normally).
  feat_vec_t cur;
  always_ff @(posedge clk) begin
    for (int k = DEPTH; k > 0; k--) feats[k] <= feats[k-1];
  end
  assign feats[0] = cur;

  bit exp_v   [$];
  bit exp_cls [$];
  int n_out = 0, n_in = 0;

  // Scoreboard: in cycle c the output must match what entered at c-DEPTH-1.
  always @(posedge clk) begin
    if (rst_n) begin
      exp_v.push_back(in_valid);
      exp_cls.push_back(in_valid ? walk(cur) : 1'b0);
      if (exp_v.size() > DEPTH + 1) begin
        bit ev, ec;
        ev = exp_v.pop_front();
        ec = exp_cls.pop_front();
        checks++;
        if (out_valid !== ev || (ev && out_cls !== ec)) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0t valid %0d/%0d cls %0d/%0d", $time, out_valid, ev, out_cls, ec);
        end
        if (ev) n_out++;
      end
    end
  end

  initial begin
    rst_n = 1'b0; cfg_we = 1'b0; in_valid = 1'b0; cur = '0;
    cfg_level = '0; cfg_idx = '0; cfg_node = '0;
    repeat (2) @(posedge clk);
    #1;
    // Load the tree while the pipeline is held in reset.
    for (int lvl = 0; lvl <= DEPTH; lvl++) begin
      for (int j = 0; j < (1 << lvl); j++) begin
        node_t n;
        n.leaf = (lvl == DEPTH) || (lvl >= 2 && $urandom_range(0, 4) == 0);
        n.cls  = 1'($urandom);
        n.feat = 3'($urandom_range(0, NUM_FEAT - 1));
        n.thr  = rate_t'($urandom_range(0, 15) << 12);  // coarse values: ties happen
        model[(1 << lvl) - 1 + j] = n;
        cfg_we = 1'b1; cfg_level = LVL_W'(lvl); cfg_idx = DEPTH'(j); cfg_node = n;
        @(posedge clk); #1;
      end
    end
    cfg_we = 1'b0;
    rst_n = 1'b1;
    for (int i = 0; i < 20_000; i++) begin
      in_valid = ($urandom_range(0, 3) != 0);
      for (int f = 0; f < NUM_FEAT; f++) cur[f] = rate_t'($urandom_range(0, 15) << 12);
      if (in_valid) n_in++;
      @(posedge clk); #1;
    end
    in_valid = 1'b0;
    repeat (DEPTH + 3) @(posedge clk);
    #1;
    checks++;
    if (n_out != n_in) begin failures++; $display("FAIL %0d results for %0d inputs", n_out, n_in); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
