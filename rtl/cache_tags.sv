// cache_tags: the sixteen tag banks of the 6-way cache.
//
// A cache line is addressed by its 10-bit relative coordinates (see mc_pkg).
// The bank comes from the line's place inside its 16x16 block:
// bank = 2 * y[3:1] + x[3] (two banks across, eight down), and the tags
// compared inside the bank are RefIdx, X-tag = x[9:4] and Y-tag = y[9:4].
// The caller presents the bank number and the tag fields; the lookup result
// (hit, hit_way) and the replacement victim (alloc_ready, alloc_way) of that
// bank are returned combinationally. lock_set/alloc act on the addressed
// bank; unlock carries its own bank number so that a line can be released
// while another is looked up. next_mb and reset_tags go to every bank.
module cache_tags
  import mc_pkg::*;
#(
  parameter int unsigned NBANKS = NUM_BANKS,
  parameter int unsigned NWAYS  = WAYS,
  parameter int unsigned NBANK_W = $clog2(NBANKS),
  parameter int unsigned NWAY_W  = (NWAYS > 1) ? $clog2(NWAYS) : 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [NBANK_W-1:0]       lk_bank,
  input  logic [REFIDX_W-1:0]      lk_refidx,
  input  logic signed [TAG_W-1:0]  lk_xtag,
  input  logic signed [TAG_W-1:0]  lk_ytag,
  output logic                     hit,
  output logic [NWAY_W-1:0]        hit_way,
  input  logic                     lock_set,
  input  logic                     alloc,
  output logic                     alloc_ready,
  output logic [NWAY_W-1:0]        alloc_way,
  input  logic                     unlock,
  input  logic [NBANK_W-1:0]       unlock_bank,
  input  logic [NWAY_W-1:0]        unlock_way,
  input  logic                     next_mb,
  input  logic                     reset_tags
);

  logic [NBANKS-1:0] b_hit, b_ready;
  logic [NWAY_W-1:0] b_hit_way   [NBANKS];
  logic [NWAY_W-1:0] b_alloc_way [NBANKS];

  for (genvar b = 0; b < NBANKS; b++) begin : g_bank
    cache_tag_bank #(.NWAYS(NWAYS), .NWAY_W(NWAY_W)) u_bank (
      .clk         (clk),
      .rst_n       (rst_n),
      .lk_refidx   (lk_refidx),
      .lk_xtag     (lk_xtag),
      .lk_ytag     (lk_ytag),
      .hit         (b_hit[b]),
      .hit_way     (b_hit_way[b]),
      .lock_set    (lock_set && lk_bank == NBANK_W'(b)),
      .lock_way    (b_hit_way[b]),
      .alloc       (alloc && lk_bank == NBANK_W'(b)),
      .alloc_ready (b_ready[b]),
      .alloc_way   (b_alloc_way[b]),
      .unlock      (unlock && unlock_bank == NBANK_W'(b)),
      .unlock_way  (unlock_way),
      .next_mb     (next_mb),
      .reset_tags  (reset_tags)
    );
  end

  assign hit         = b_hit[lk_bank];
  assign hit_way     = b_hit_way[lk_bank];
  assign alloc_ready = b_ready[lk_bank];
  assign alloc_way   = b_alloc_way[lk_bank];

endmodule
