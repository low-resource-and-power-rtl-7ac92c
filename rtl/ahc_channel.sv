// ahc_channel: one access-hit counter channel with entry-point normalisation
// and the HRTable access flag.
//
// Two 32-bit counters accumulate cache accesses (inc_a) and hits (inc_a and
// inc_h together) since the last clear. From them the channel derives the
// 8-bit entry point of the hit-rate table: both counters are shifted right by
// the same amount, chosen so that the access count keeps exactly its eight
// most significant bits (a_shr has its MSB set once a_cnt >= 128). Keeping
// the leading bits, rather than halving the counters on overflow, keeps the
// ratio h/a accurate; this follows the document. Example: a_cnt = 1,425,404,
// h_cnt = 942,079 give a_shr = 173, h_shr = 114 (shift by 13).
//
// Access control: upd is set in the cycle after the entry point changed,
// i.e. exactly when the table must be read again. While the entry point is
// unchanged the table keeps its previous output and is not read.
//
// Timing: counters, entry point and upd are registered; they reflect the
// events sampled at the previous clock edge. A clear sets the counters and
// entry point to zero and raises upd so the downstream table is re-read.
// Design choices not given by the document: the counters saturate at
// 2^32-1 (both stop), a hit is only counted together with an access, and
// clear is a synchronous restart used at program start.
module ahc_channel
  import mdm_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic clear,   // synchronous restart of the counters
  input  logic inc_a,   // one cache access in this cycle
  input  logic inc_h,   // the access hit
  output cnt_t a_cnt,
  output cnt_t h_cnt,
  output ent_t a_shr,   // normalised access count (entry point)
  output ent_t h_shr,   // normalised hit count (entry point)
  output logic upd      // entry point changed: table read needed
);

  cnt_t a_nxt, h_nxt;
  ent_t a_shr_nxt, h_shr_nxt;
  logic [4:0] shamt;

  // Next counter values (saturating).
  always_comb begin
    a_nxt = a_cnt;
    h_nxt = h_cnt;
    if (inc_a && (a_cnt != '1)) begin
      a_nxt = a_cnt + 1'b1;
      if (inc_h) h_nxt = h_cnt + 1'b1;
    end
  end

  // Shift so that the leading one of a_nxt lands in bit ENT_W-1.
  always_comb begin
    shamt = '0;
    for (int b = ENT_W; b < CNT_W; b++) begin
      if (a_nxt[b]) shamt = 5'(b - (ENT_W - 1));
    end
    a_shr_nxt = ent_t'(a_nxt >> shamt);
    h_shr_nxt = ent_t'(h_nxt >> shamt);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_cnt <= '0;
      h_cnt <= '0;
      a_shr <= '0;
      h_shr <= '0;
      upd   <= 1'b1;
    end else if (clear) begin
      a_cnt <= '0;
      h_cnt <= '0;
      a_shr <= '0;
      h_shr <= '0;
      upd   <= 1'b1;
    end else begin
      a_cnt <= a_nxt;
      h_cnt <= h_nxt;
      a_shr <= a_shr_nxt;
      h_shr <= h_shr_nxt;
      upd   <= (a_shr_nxt != a_shr) || (h_shr_nxt != h_shr);
    end
  end

  // Hits never exceed accesses.
  always_ff @(posedge clk) begin
    if (rst_n) assert (h_cnt <= a_cnt) else $error("ahc_channel: more hits than accesses");
  end

endmodule
