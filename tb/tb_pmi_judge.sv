// tb_pmi_judge: self-checking test of the PMI-rate judge.
//
// Uses a 20-instruction interval so the 30 % threshold falls between 6
// (not exceeded) and 7 (exceeded) malicious instructions. Intervals with a
// chosen number of malicious results, random positions and random gaps in
// in_valid are driven; win_done must pulse exactly once per interval, one
// cycle after its last instruction, with the right count and verdict. The
// malware flag must stay low until the first interval over the threshold,
// then stay high until clear.
module tb_pmi_judge;
  localparam int WINDOW = 20;
  localparam int CNT_W  = $clog2(WINDOW + 1);

  logic             clk = 1'b0;
  logic             rst_n, clear, in_valid, in_mal, win_done, win_over, malware;
  logic [CNT_W-1:0] win_mal;
  int               checks = 0, failures = 0;

  pmi_judge #(.WINDOW(WINDOW), .THRESH_PCT(30)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t: done=%0d mal=%0d over=%0d malware=%0d",
                                  what, $time, win_done, win_mal, win_over, malware);
    end
  endtask

  // Drive one interval with exactly m malicious instructions.
  task automatic interval(input int m, input bit exp_malware_after);
    bit lbl [WINDOW];
    for (int i = 0; i < WINDOW; i++) lbl[i] = (i < m);
    lbl.shuffle();
    for (int i = 0; i < WINDOW; i++) begin
      while ($urandom_range(0, 3) == 0) begin
        in_valid = 1'b0; in_mal = 1'($urandom);
        @(posedge clk); #1;
        check(!win_done, "no pulse inside interval");
      end
      in_valid = 1'b1; in_mal = lbl[i];
      @(posedge clk); #1;
      if (i < WINDOW - 1) check(!win_done, "no pulse inside interval");
    end
    in_valid = 1'b0;
    check(win_done && int'(win_mal) == m, "interval count");
    check(win_over == (m * 100 > 30 * WINDOW), "threshold verdict");
    check(malware == exp_malware_after, "malware flag");
    @(posedge clk); #1;
    check(!win_done, "pulse is one cycle");
  endtask

  initial begin
    rst_n = 1'b0; clear = 1'b0; in_valid = 1'b0; in_mal = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    interval(0, 0);
    interval(6, 0);    // exactly 30 %: not exceeded
    interval(5, 0);
    interval(7, 1);    // 35 %: malware
    interval(2, 1);    // flag is sticky
    clear = 1'b1; @(posedge clk); #1; clear = 1'b0;
    check(!malware, "clear drops flag");
    for (int r = 0; r < 200; r++) interval($urandom_range(0, 6), 0);
    interval(WINDOW, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
