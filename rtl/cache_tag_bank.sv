// cache_tag_bank: tag store, hit detection and tag update of one cache bank.
//
// Each of the WAYS lines has four tag registers: Lock (line fetched or hit
// but not yet used for interpolation; it must not be replaced), RefIdx
// (reference frame index, 4'b1111 marks an empty line), X-tag and Y-tag (the
// 6-bit 16x16-block index of the line relative to the current macroblock).
// A lookup compares RefIdx, X-tag and Y-tag of all ways in parallel and
// returns hit and the hit way (lowest way if several match).
//
// Tag updates follow the relative-coordinate scheme of the document:
//   next_mb     : the macroblock moves 16 pixels right, so every X-tag is
//                 decremented by one. A line whose X-tag would wrap below
//                 -32 is emptied (RefIdx := 1111) so it cannot alias; that
//                 wrap guard is this design's choice.
//   reset_tags  : start of a macroblock row or a frame: Lock 0, RefIdx 1111,
//                 X-tag 0, Y-tag 0 for every line.
// Write operations, one per cycle, priority reset_tags > next_mb > others:
//   lock_set (lock a hit line), alloc (write a new tag with Lock=1 into the
//   replacement victim), unlock (clear Lock after interpolation use).
// alloc_ready is 0 when every line is locked. All outputs are
// combinational from the registers; updates take effect at the next edge.
module cache_tag_bank
  import mc_pkg::*;
#(
  parameter int unsigned NWAYS = WAYS,
  parameter int unsigned NWAY_W = (NWAYS > 1) ? $clog2(NWAYS) : 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // lookup
  input  logic [REFIDX_W-1:0]      lk_refidx,
  input  logic signed [TAG_W-1:0]  lk_xtag,
  input  logic signed [TAG_W-1:0]  lk_ytag,
  output logic                     hit,
  output logic [NWAY_W-1:0]        hit_way,
  // writes
  input  logic                     lock_set,
  input  logic [NWAY_W-1:0]        lock_way,
  input  logic                     alloc,
  output logic                     alloc_ready,
  output logic [NWAY_W-1:0]        alloc_way,
  input  logic                     unlock,
  input  logic [NWAY_W-1:0]        unlock_way,
  input  logic                     next_mb,
  input  logic                     reset_tags
);

  line_tag_t           tags [NWAYS];
  logic [NWAYS-1:0]    lock_vec;

  always_comb begin
    hit     = 1'b0;
    hit_way = '0;
    for (int unsigned w = 0; w < NWAYS; w++) begin
      lock_vec[w] = tags[w].lock;
      if (!hit && tags[w].refidx != REFIDX_INVALID &&
          tags[w].refidx == lk_refidx && tags[w].xtag == lk_xtag &&
          tags[w].ytag == lk_ytag) begin
        hit     = 1'b1;
        hit_way = NWAY_W'(w);
      end
    end
  end

  replacement_ctrl #(.WAYS(NWAYS), .WAY_W(NWAY_W)) u_repl (
    .clk          (clk),
    .rst_n        (rst_n),
    .lock_vec     (lock_vec),
    .alloc        (alloc && !reset_tags && !next_mb),
    .clear        (reset_tags),
    .victim_way   (alloc_way),
    .victim_valid (alloc_ready)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned w = 0; w < NWAYS; w++)
        tags[w] <= '{lock: 1'b0, refidx: REFIDX_INVALID, xtag: '0, ytag: '0};
    end else if (reset_tags) begin
      for (int unsigned w = 0; w < NWAYS; w++)
        tags[w] <= '{lock: 1'b0, refidx: REFIDX_INVALID, xtag: '0, ytag: '0};
    end else if (next_mb) begin
      for (int unsigned w = 0; w < NWAYS; w++) begin
        if (tags[w].xtag == {1'b1, {(TAG_W-1){1'b0}}})
          tags[w].refidx <= REFIDX_INVALID;
        tags[w].xtag <= tags[w].xtag - TAG_W'(1);
      end
    end else begin
      if (lock_set)
        tags[lock_way].lock <= 1'b1;
      if (unlock)
        tags[unlock_way].lock <= 1'b0;
      if (alloc && alloc_ready)
        tags[alloc_way] <= '{lock: 1'b1, refidx: lk_refidx, xtag: lk_xtag, ytag: lk_ytag};
    end
  end

endmodule
