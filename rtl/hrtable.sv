// hrtable: hit-rate table (HRTable), the division-free hit-rate lookup.
//
// The table is addressed by the 8-bit entry point (a_shr, h_shr) and returns
// the hit rate h/a as a 16-bit binary fraction, floor(h * 2^16 / a). A rate
// of 100 % (h == a) would need a 17th bit and is stored as 0, and impossible
// entries (h > a) hold 0; both follow the document. Because a normalised
// access count always has its MSB set once 128 accesses have been seen,
// only the right half of the table (a_shr = 128..255) is kept: 128 x 256
// entries of 16 bits, half the full table, as the document proposes. An
// entry point in the removed left half (the first 127 accesses after a
// clear) reads as rate 0; that choice is this design's own.
//
// Interface and timing: a synchronous ROM read, one cycle of latency. The
// table is only read when en (the access flag from the counter) is high;
// otherwise rate keeps its last value, which is the hit rate of the
// unchanged entry point. The contents are computed at start-up from the
// formula above, so no data file is needed.
module hrtable
  import mdm_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,     // access flag: read the table this cycle
  input  ent_t  a_shr,
  input  ent_t  h_shr,
  output rate_t rate
);

  localparam int DEPTH = (1 << (ENT_W - 1)) * (1 << ENT_W); // 128 x 256

  rate_t rom [DEPTH];

  initial begin
    for (int a = 0; a < (1 << (ENT_W - 1)); a++) begin
      for (int h = 0; h < (1 << ENT_W); h++) begin
        int unsigned av, q;
        av = unsigned'(a) + (1 << (ENT_W - 1));
        q  = (unsigned'(h) << RATE_W) / av;
        rom[a * (1 << ENT_W) + h] = (unsigned'(h) > av) ? '0 : rate_t'(q);
      end
    end
  end

  logic [$clog2(DEPTH)-1:0] addr;
  assign addr = {a_shr[ENT_W-2:0], h_shr};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      rate <= '0;
    else if (en)     rate <= a_shr[ENT_W-1] ? rom[addr] : '0;
  end

endmodule
