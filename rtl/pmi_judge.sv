// pmi_judge: predicted-malicious-instruction (PMI) rate and final verdict.
//
// The classifier labels every instruction benign or malicious. This block
// counts, over consecutive intervals of WINDOW instructions, how many were
// predicted malicious. At the end of each interval it compares the PMI rate
// with THRESH_PCT percent without a divider (mal * 100 > THRESH_PCT *
// WINDOW) and, if the rate exceeds the threshold, raises the sticky malware
// flag: the program is judged to be malware if the rate exceeds the threshold
// in any interval. The 30 % threshold follows the document; the interval
// length is not given there and WINDOW is this design's choice.
//
// Interface and timing: one result per cycle on in_valid/in_mal. win_done
// pulses for one cycle after the last instruction of an interval, together
// with win_mal (that interval's malicious count) and win_over (threshold
// exceeded). malware stays set until clear (program start) or reset.
module pmi_judge #(
  parameter int WINDOW     = 10000,
  parameter int THRESH_PCT = 30,
  parameter int CNT_W      = $clog2(WINDOW + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             in_valid,
  input  logic             in_mal,
  output logic             win_done,
  output logic [CNT_W-1:0] win_mal,
  output logic             win_over,
  output logic             malware
);

  logic [CNT_W-1:0] n_instr, n_mal, mal_nxt;
  logic             last, over_nxt;

  assign last     = in_valid && (int'(n_instr) == WINDOW - 1);
  assign mal_nxt  = n_mal + CNT_W'(in_mal);
  assign over_nxt = (64'(mal_nxt) * 100) > (64'(THRESH_PCT) * 64'(WINDOW));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n_instr  <= '0;
      n_mal    <= '0;
      win_done <= 1'b0;
      win_mal  <= '0;
      win_over <= 1'b0;
      malware  <= 1'b0;
    end else if (clear) begin
      n_instr  <= '0;
      n_mal    <= '0;
      win_done <= 1'b0;
      win_over <= 1'b0;
      malware  <= 1'b0;
    end else begin
      win_done <= 1'b0;
      if (in_valid) begin
        if (last) begin
          n_instr  <= '0;
          n_mal    <= '0;
          win_done <= 1'b1;
          win_mal  <= mal_nxt;
          win_over <= over_nxt;
          if (over_nxt) malware <= 1'b1;
        end else begin
          n_instr <= n_instr + 1'b1;
          n_mal   <= mal_nxt;
        end
      end
    end
  end

endmodule
