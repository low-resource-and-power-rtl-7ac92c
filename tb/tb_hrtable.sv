// tb_hrtable: self-checking test of the hit-rate table.
//
// Every entry of the kept right half (a_shr = 128..255, h_shr = 0..255) is
// read and compared with a reference computed in floating point:
// floor(h / a * 2^16), 0 for h >= a (100 % and impossible entries). A
// sample of left-half entry points must read as 0. The read latency of one
// cycle is checked, and with the access flag low the output must hold.
module tb_hrtable;
  import mdm_pkg::*;

  logic  clk = 1'b0;
  logic  rst_n, en;
  ent_t  a_shr, h_shr;
  rate_t rate;
  int    checks = 0, failures = 0;

  hrtable dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic rate_t ref_rate(input int a, input int h);
    real r;
    if (a < 128 || h >= a) return '0;
    r = $floor(real'(h) * 65536.0 / real'(a));
    return rate_t'(longint'(r));
  endfunction

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s: a=%0d h=%0d rate=%h exp=%h",
                                  what, a_shr, h_shr, rate, ref_rate(a_shr, h_shr));
    end
  endtask

  rate_t held;

  initial begin
    rst_n = 1'b0; en = 1'b0; a_shr = '0; h_shr = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    check(rate == 0, "reset value");
    for (int a = 0; a < 256; a++) begin
      for (int h = 0; h < 256; h++) begin
        if (a >= 128 || (h % 37) == 0) begin
          en = 1'b1; a_shr = ent_t'(a); h_shr = ent_t'(h);
          @(posedge clk); #1;
          check(rate == ref_rate(a, h), "table entry");
        end
      end
    end
    // Worked values: 3/4 and 1/2 of full scale, 100 % kept as 0.
    en = 1'b1; a_shr = 8'd200; h_shr = 8'd150; @(posedge clk); #1;
    check(rate == 16'hC000, "150/200 = 0.75");
    held = rate;
    // Access flag low: the table is not read, the output holds.
    en = 1'b0; a_shr = 8'd130; h_shr = 8'd65;
    repeat (3) begin @(posedge clk); #1; check(rate == held, "hold while en low"); end
    en = 1'b1; @(posedge clk); #1;
    check(rate == 16'h8000, "65/130 = 0.5 after one cycle");
    a_shr = 8'd173; h_shr = 8'd173; @(posedge clk); #1;
    check(rate == 16'h0000, "100 % stored as 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
