// tb_ahc_channel: self-checking test of one access-hit counter channel.
//
// Phase 1 replays the access-control example: counts are driven up to
// a = 1,425,404 and h = 942,079, where the entry point must be (173, 114);
// further events must raise the access flag exactly when an 8-bit entry
// point changes (h_shr 114 -> 115, a_shr 173 -> 174) and keep it low
// otherwise. Phase 2 clears the channel and compares counters, entry point
// and flag with a reference model every cycle under random traffic. The
// reference normalises by repeated halving, independently of the RTL's
// leading-one search.
module tb_ahc_channel;
  import mdm_pkg::*;

  logic clk = 1'b0;
  logic rst_n, clear, inc_a, inc_h;
  cnt_t a_cnt, h_cnt;
  ent_t a_shr, h_shr;
  logic upd;
  int   checks = 0, failures = 0;

  ahc_channel dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (4_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void ref_shr(input longint a, input longint h, output int as, output int hs);
    while (a >= 256) begin a = a / 2; h = h / 2; end
    as = int'(a); hs = int'(h);
  endfunction

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s: a=%0d h=%0d a_shr=%0d h_shr=%0d upd=%0d",
                                  what, a_cnt, h_cnt, a_shr, h_shr, upd);
    end
  endtask

  task automatic step(input bit a, input bit h);
    inc_a = a; inc_h = h;
    @(posedge clk); #1;
  endtask

  longint ra, rh;
  int     ras, rhs, pas, phs;

  initial begin
    rst_n = 1'b0; clear = 1'b0; inc_a = 1'b0; inc_h = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    // ---- phase 1: the worked example
    repeat (942_079) step(1, 1);
    repeat (1_425_404 - 942_079) step(1, 0);

    check(a_cnt == 1_425_404 && h_cnt == 942_079, "counter values");
    check(a_shr == 173 && h_shr == 114, "entry point (173,114)");
    step(1, 1);  // 1,425,405 / 942,080
    check(a_shr == 173 && h_shr == 115 && upd, "h_shr change flagged");
    step(1, 0);  // 1,425,406 / 942,080
    check(a_shr == 173 && h_shr == 115 && !upd, "no change, no access");
    step(0, 0);
    check(!upd && a_cnt == 1_425_406, "idle cycle");
    step(0, 1);  // hit without access is not counted
    check(!upd && h_cnt == 942_080, "hit without access ignored");
    step(1, 0);  // 1,425,407
    check(!upd, "a_cnt 1,425,407 keeps entry point");
    step(1, 0);  // 1,425,408 -> a_shr 174
    check(a_shr == 174 && h_shr == 115 && upd, "a_shr change flagged");
    step(0, 0);
    check(!upd, "flag drops");
    // ---- phase 2: random traffic against the reference
    clear = 1'b1; step(0, 0); clear = 1'b0;
    check(a_cnt == 0 && h_cnt == 0 && upd, "clear");
    ra = 0; rh = 0; pas = 0; phs = 0;
    for (int i = 0; i < 300_000; i++) begin
      bit a, h;
      a = ($urandom_range(0, 9) < 8);
      h = ($urandom_range(0, 9) < ((i / 50_000) % 2 == 0 ? 9 : 3));
      step(a, h);
      if (a) begin ra++; if (h) rh++; end
      ref_shr(ra, rh, ras, rhs);
      check(a_cnt == cnt_t'(ra) && h_cnt == cnt_t'(rh), "random counters");
      check(int'(a_shr) == ras && int'(h_shr) == rhs, "random entry point");
      check(upd == ((ras != pas) || (rhs != phs)), "random access flag");
      pas = ras; phs = rhs;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
