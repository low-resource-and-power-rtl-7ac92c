// tb_mdm_activity: 500,000-instruction activity run of the full design at
// default parameters.
//
// Processor information is streamed for 500,000 instructions, one per cycle:
// 250,000 of a benign-looking program (high cache hit ratios), then, after a
// clear, 250,000 of a malware-looking one (low data-cache hit ratio), with
// user and kernel program counters mixed. The forest is built as in
// tb_mdm_top: every tree first splits on the user data-cache hit rate.
//
// Checks: every instruction gets a verdict; the number of forest
// evaluations equals the number of feature-vector changes counted here; the
// benign half is never flagged and the malware half is; and access control
// skips at least 90 % of the hit-rate table lookups over the run. The
// fractions of table lookups and forest evaluations saved are printed as
// the run's activity figures.
module tb_mdm_activity;
  import mdm_pkg::*;

  localparam int NT     = 10;
  localparam int DEPTH  = 10;
  localparam int TREE_W = $clog2(NT);
  localparam int LVL_W  = $clog2(DEPTH + 1);
  localparam int WCNT_W = $clog2(10000 + 1);
  localparam int HALF   = 250_000;

  logic                clk = 1'b0;
  logic                rst_n, clear, info_valid, ic_acc, ic_hit, dc_acc, dc_hit;
  logic [63:0]         pc;
  logic                cfg_we;
  logic [TREE_W-1:0]   cfg_tree;
  logic [LVL_W-1:0]    cfg_level;
  logic [DEPTH-1:0]    cfg_idx;
  node_t               cfg_node;
  feat_vec_t           feats;
  logic                feats_valid, instr_valid, instr_mal, win_done, win_over, malware;
  logic                clf_eval, instr_eval;
  logic [WCNT_W-1:0]   win_mal;
  logic [NUM_FEAT-1:0] hrt_read;
  int                  checks = 0, failures = 0;

  mdm_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (600_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  longint    n_lookups = 0, n_reads = 0, n_feat = 0, n_change = 0, n_eval = 0, n_verdict = 0;
  longint    n_windows = 0, n_over = 0;
  feat_vec_t prev;
  bit        have_prev = 0;

  always @(posedge clk) begin
    if (rst_n) begin
      if (dut.u_ahc.valid_q) begin
        n_lookups += NUM_FEAT;
        n_reads   += $countones(hrt_read);
      end
      if (clear) have_prev = 0;
      else if (feats_valid) begin
        n_feat++;
        if (!have_prev || feats != prev) n_change++;
        prev = feats; have_prev = 1;
      end
      if (clf_eval) n_eval++;
      if (instr_valid) n_verdict++;
      if (win_done) begin n_windows++; if (win_over) n_over++; end
    end
  end

  task automatic run_program(input int n, input int ih_pct, input int dh_pct);
    for (int i = 0; i < n; i++) begin
      bit kern;
      kern = ($urandom_range(0, 99) < 30);
      info_valid = 1'b1;
      pc = kern ? {32'hFFFF_FFC0 + 32'($urandom_range(0, 63)), 32'($urandom)}
                : {32'h0, 32'($urandom_range(32'h1_0000, 32'h7FFF_FFFF))};
      ic_acc = ($urandom_range(0, 99) < 95);
      ic_hit = ($urandom_range(0, 99) < ih_pct);
      dc_acc = ($urandom_range(0, 99) < 40);
      dc_hit = ($urandom_range(0, 99) < dh_pct);
      @(posedge clk); #1;
    end
    info_valid = 1'b0;
    repeat (DEPTH + 6) @(posedge clk);
    #1;
  endtask

  initial begin
    rst_n = 1'b0; clear = 1'b0; info_valid = 1'b0; pc = '0;
    ic_acc = 0; ic_hit = 0; dc_acc = 0; dc_hit = 0;
    cfg_we = 1'b0; cfg_tree = '0; cfg_level = '0; cfg_idx = '0; cfg_node = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
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
          cfg_we = 1'b1; cfg_tree = TREE_W'(t); cfg_level = LVL_W'(lvl);
          cfg_idx = DEPTH'(j); cfg_node = n;
          @(posedge clk); #1;
        end
    cfg_we = 1'b0;
    clear = 1'b1; @(posedge clk); #1; clear = 1'b0;
    run_program(HALF, 96, 92);
    check(!malware, "benign half not flagged");
    clear = 1'b1; @(posedge clk); #1; clear = 1'b0;
    run_program(HALF, 80, 25);
    check(malware, "malware half flagged");
    check(n_verdict == 2 * HALF, "one verdict per instruction");
    check(n_eval == n_change, "forest started once per feature change");
    check(n_reads * 10 <= n_lookups, "at least 90 % of table lookups skipped");
    $display("table lookups %0d, reads %0d (%0d.%0d %% skipped)", n_lookups, n_reads,
             (n_lookups - n_reads) * 100 / n_lookups, ((n_lookups - n_reads) * 1000 / n_lookups) % 10);
    $display("forest: %0d instructions, %0d evaluations (%0d %% reused); %0d intervals, %0d over",
             n_feat, n_eval, (n_feat - n_eval) * 100 / n_feat, n_windows, n_over);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
