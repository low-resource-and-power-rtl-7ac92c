// tb_access_hit_counter: self-checking test of the six-channel access-hit
// counter.
//
// Random instructions are reported with a program counter in either the
// user or the kernel area and random cache access/hit signals, with random
// idle cycles. A reference model keeps the six access/hit counts (total,
// kernel and user, for each cache) and the normalised entry points; every
// cycle the counters, entry points, access flags and valid_q are compared.
// The kernel/user split is also checked to add up to the totals.
module tb_access_hit_counter;
  import mdm_pkg::*;

  localparam int PC_W = 64;

  logic                 clk = 1'b0;
  logic                 rst_n, clear, info_valid, ic_acc, ic_hit, dc_acc, dc_hit, valid_q;
  logic [PC_W-1:0]      pc;
  ent_t [NUM_FEAT-1:0]  a_shr, h_shr;
  logic [NUM_FEAT-1:0]  upd;
  cnt_t [NUM_FEAT-1:0]  a_cnt, h_cnt;
  int                   checks = 0, failures = 0;

  access_hit_counter dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400_000) @(posedge clk);
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

  longint ra [NUM_FEAT], rh [NUM_FEAT];
  int     pas [NUM_FEAT], phs [NUM_FEAT];
  int     n_kernel = 0, n_user = 0;

  initial begin
    rst_n = 1'b0; clear = 1'b0; info_valid = 1'b0; pc = '0;
    ic_acc = 0; ic_hit = 0; dc_acc = 0; dc_hit = 0;
    for (int f = 0; f < NUM_FEAT; f++) begin ra[f] = 0; rh[f] = 0; pas[f] = 0; phs[f] = 0; end
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < 300_000; i++) begin
      bit kern, ia, ih, da, dh;
      int phase;
      phase = (i / 20_000) % 3;           // vary hit ratios over time
      kern = ($urandom_range(0, 9) < 3);
      info_valid = ($urandom_range(0, 9) != 0);
      pc = kern ? {32'hFFFF_FFC0 + 32'($urandom_range(0, 63)), 32'($urandom)}
                : {32'h0, 32'($urandom)};
      ia = ($urandom_range(0, 9) < 9);
      ih = ($urandom_range(0, 9) < (phase == 0 ? 9 : 5));
      da = ($urandom_range(0, 9) < 4);
      dh = ($urandom_range(0, 9) < (phase == 1 ? 2 : 8));
      ic_acc = ia; ic_hit = ih; dc_acc = da; dc_hit = dh;
      @(posedge clk); #1;
      if (info_valid) begin
        if (kern) n_kernel++; else n_user++;
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
      end
      check(valid_q == info_valid, "valid_q");
      for (int f = 0; f < NUM_FEAT; f++) begin
        longint a, h;
        a = ra[f]; h = rh[f];
        while (a >= 256) begin a /= 2; h /= 2; end
        check(a_cnt[f] == cnt_t'(ra[f]) && h_cnt[f] == cnt_t'(rh[f]), $sformatf("counters of feature %0d", f));
        check(int'(a_shr[f]) == int'(a) && int'(h_shr[f]) == int'(h), $sformatf("entry point of feature %0d", f));
        check(upd[f] == ((int'(a) != pas[f]) || (int'(h) != phs[f])), $sformatf("access flag of feature %0d", f));
        pas[f] = int'(a); phs[f] = int'(h);
      end
      check(a_cnt[F_KERN_I] + a_cnt[F_USER_I] == a_cnt[F_TOTAL_I], "I-cache split adds up");
      check(h_cnt[F_KERN_D] + h_cnt[F_USER_D] == h_cnt[F_TOTAL_D], "D-cache split adds up");
    end
    check(n_kernel > 1000 && n_user > 1000, "both modes exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
