// access_hit_counter: the MDM's access-hit counter for six hit-rate features.
//
// Every cycle in which the processor reports an instruction (info_valid) the
// L1 instruction-cache and data-cache access/hit signals are counted into six
// ahc_channel instances: total, kernel-mode and user-mode counts for each of
// the two caches, in the feature order of mdm_pkg. The split by CPU mode is
// the document's proposal; the mode is taken from the program counter: an
// instruction whose PC lies at or above KERNEL_BASE runs in the kernel area,
// any other in the user area, and its data-cache access is attributed to the
// same mode. KERNEL_BASE defaults to the start of the kernel half of the
// 64-bit Sv39 address space used by RISC-V Linux; the document does not give
// the boundary.
//
// Outputs, one register stage after the inputs: the six 8-bit entry points
// (a_shr, h_shr), the six access flags (upd) and the raw 32-bit counters.
// valid_q marks the cycle whose inputs have just been counted.
module access_hit_counter
  import mdm_pkg::*;
#(
  parameter int              PC_W        = 64,
  parameter logic [PC_W-1:0] KERNEL_BASE = 64'hFFFF_FFC0_0000_0000
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      clear,
  input  logic                      info_valid,
  input  logic [PC_W-1:0]           pc,
  input  logic                      ic_acc,
  input  logic                      ic_hit,
  input  logic                      dc_acc,
  input  logic                      dc_hit,
  output logic                      valid_q,
  output ent_t  [NUM_FEAT-1:0]      a_shr,
  output ent_t  [NUM_FEAT-1:0]      h_shr,
  output logic  [NUM_FEAT-1:0]      upd,
  output cnt_t  [NUM_FEAT-1:0]      a_cnt,
  output cnt_t  [NUM_FEAT-1:0]      h_cnt
);

  logic kernel;
  logic [NUM_FEAT-1:0] inc_a, inc_h;

  assign kernel = (pc >= KERNEL_BASE);

  always_comb begin
    inc_a[F_TOTAL_I] = info_valid && ic_acc;
    inc_h[F_TOTAL_I] = ic_hit;
    inc_a[F_TOTAL_D] = info_valid && dc_acc;
    inc_h[F_TOTAL_D] = dc_hit;
    inc_a[F_KERN_I]  = info_valid && ic_acc && kernel;
    inc_h[F_KERN_I]  = ic_hit;
    inc_a[F_KERN_D]  = info_valid && dc_acc && kernel;
    inc_h[F_KERN_D]  = dc_hit;
    inc_a[F_USER_I]  = info_valid && ic_acc && !kernel;
    inc_h[F_USER_I]  = ic_hit;
    inc_a[F_USER_D]  = info_valid && dc_acc && !kernel;
    inc_h[F_USER_D]  = dc_hit;
  end

  for (genvar f = 0; f < NUM_FEAT; f++) begin : g_ch
    ahc_channel u_ch (
      .clk   (clk),
      .rst_n (rst_n),
      .clear (clear),
      .inc_a (inc_a[f]),
      .inc_h (inc_h[f]),
      .a_cnt (a_cnt[f]),
      .h_cnt (h_cnt[f]),
      .a_shr (a_shr[f]),
      .h_shr (h_shr[f]),
      .upd   (upd[f])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) valid_q <= 1'b0;
    else        valid_q <= info_valid && !clear;
  end

endmodule
