// mc_top: cache-based motion-compensation reference fetch engine.
//
// Reference pixels for motion compensation go through a 6-way, 16-bank,
// 1.5 kB cache so that windows of neighbouring blocks - in the same
// macroblock or in the next one - share the pixels they overlap instead of
// loading them again from SDRAM. Misses are fetched by an SDRAM controller
// that keeps each row open for as long as the window needs it, prepares the
// next row in another bank while reading, and uses a vertical word order
// inside each row so that tall windows read in long bursts.
//
// Blocks: data_fetch_ctrl (per-window control, tag update per macroblock),
// cache_tags (16 x cache_tag_bank, each with a replacement_ctrl),
// dram_ctrl (reordering, early precharge/activate), sram_ag_ctrl and
// sram_set (four single-port SRAMs), interpolator (6-tap luma sub-pixel
// filter). Motion vector generation and the SDRAM device are outside: their
// connections are the ports of this module.
//
// Interface:
//   mb_valid/mb_ready, mb_x, mb_y    start of a macroblock (coordinates in
//                                    macroblocks); x = 0 resets the tags
//   blk_*                            reference window: refidx, top-left
//                                    (x0, y0) relative to the macroblock,
//                                    width X+5 and height Y+5 in pixels for
//                                    an X x Y block, and the quarter-pixel
//                                    fraction (fx, fy) of its motion vector
//   pix_*                            the X*Y predicted pixels, one per cycle
//   dram_cmd/bank/row/col, dram_dq   SDRAM command bus and 64-bit read data
//                                    (data CL cycles after RD)
//   out_*                            cache lines of the window, one per
//                                    cycle, as sent to the interpolator
//   *_count                          hit/miss/ACT/RD/burst statistics
// Timing: a window of L lines with M misses takes about L lookup cycles,
// the SDRAM time for 2M words, L read cycles and X*Y interpolation cycles;
// the next window is taken when the interpolator is done.
module mc_top
  import mc_pkg::*;
#(
  parameter int unsigned FRAME_W = 1920,
  parameter int unsigned FRAME_H = 1080,
  parameter int unsigned MAX_REQ = 48,
  parameter int unsigned TRP     = 5,
  parameter int unsigned TRCD    = 5,
  parameter int unsigned CL      = 3
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     mb_valid,
  output logic                     mb_ready,
  input  logic [MB_W-1:0]          mb_x,
  input  logic [MB_W-1:0]          mb_y,
  input  logic                     blk_valid,
  output logic                     blk_ready,
  input  logic [REFIDX_W-1:0]      blk_refidx,
  input  logic signed [POS_W-1:0]  blk_x0,
  input  logic signed [POS_W-1:0]  blk_y0,
  input  logic [4:0]               blk_w,
  input  logic [4:0]               blk_h,
  input  logic [1:0]               blk_fx,
  input  logic [1:0]               blk_fy,
  output dram_cmd_e                dram_cmd,
  output logic [DBANK_W-1:0]       dram_bank,
  output logic [DROW_W-1:0]        dram_row,
  output logic [DCOL_W-1:0]        dram_col,
  input  logic [WORD_W-1:0]        dram_dq,
  output logic                     out_valid,
  output logic [LINE_W-1:0]        out_line,
  output logic signed [POS_W-1:0]  out_x,
  output logic signed [POS_W-1:0]  out_y,
  output logic                     out_last,
  output logic                     pix_valid,
  output logic [7:0]               pix,
  output logic [3:0]               pix_x,
  output logic [3:0]               pix_y,
  output logic                     pix_last,
  output logic [31:0]              hit_count,
  output logic [31:0]              miss_count,
  output logic [31:0]              act_count,
  output logic [31:0]              rd_count,
  output logic [31:0]              burst_count
);

  localparam int unsigned LINES  = NUM_BANKS * WAYS;
  localparam int unsigned SADDR_W = $clog2(LINES);

  // cache tags
  logic [BANK_W-1:0]        lk_bank, unlock_bank;
  logic [REFIDX_W-1:0]      lk_refidx;
  logic signed [TAG_W-1:0]  lk_xtag, lk_ytag;
  logic                     hit, lock_set, alloc, alloc_ready, unlock;
  logic                     next_mb, reset_tags;
  logic [WAY_W-1:0]         hit_way, alloc_way, unlock_way;
  // DRAM controller
  logic                     dreq_valid, dreq_ready, dstart, dbusy;
  line_req_t                dreq;
  logic                     wr_valid, wr_word;
  logic [BANK_W-1:0]        wr_bank;
  logic [WAY_W-1:0]         wr_way;
  logic [WORD_W-1:0]        wr_data;
  // SRAM
  logic                     rd_valid, rd_ready, rd_valid_q;
  logic [BANK_W-1:0]        rd_bank;
  logic [WAY_W-1:0]         rd_way;
  logic [LINE_W-1:0]        rd_line;
  logic [3:0]               s_ce, s_we;
  logic [SADDR_W-1:0]       s_addr  [4];
  logic [31:0]              s_wdata [4];
  logic [31:0]              s_rdata [4];

  // a window is taken only when the interpolator has finished the last one
  logic fetch_blk_ready, interp_ready;
  assign blk_ready = fetch_blk_ready && interp_ready;

  data_fetch_ctrl #(.FRAME_W(FRAME_W), .FRAME_H(FRAME_H)) u_fetch (
    .clk, .rst_n,
    .mb_valid, .mb_ready, .mb_x, .mb_y,
    .blk_valid (blk_valid && interp_ready), .blk_ready (fetch_blk_ready), .blk_refidx, .blk_x0, .blk_y0, .blk_w, .blk_h,
    .lk_bank, .lk_refidx, .lk_xtag, .lk_ytag, .hit, .hit_way,
    .lock_set, .alloc, .alloc_ready, .alloc_way,
    .unlock, .unlock_bank, .unlock_way, .next_mb, .reset_tags,
    .dreq_valid, .dreq_ready, .dreq, .dstart, .dbusy,
    .rd_valid, .rd_ready, .rd_bank, .rd_way, .rd_valid_q, .rd_line,
    .out_valid, .out_line, .out_x, .out_y, .out_last,
    .hit_count, .miss_count
  );

  cache_tags u_tags (
    .clk, .rst_n,
    .lk_bank, .lk_refidx, .lk_xtag, .lk_ytag, .hit, .hit_way,
    .lock_set, .alloc, .alloc_ready, .alloc_way,
    .unlock, .unlock_bank, .unlock_way, .next_mb, .reset_tags
  );

  dram_ctrl #(.MAX_REQ(MAX_REQ), .TRP(TRP), .TRCD(TRCD), .CL(CL)) u_dram (
    .clk, .rst_n,
    .req_valid (dreq_valid), .req_ready (dreq_ready), .req (dreq),
    .start (dstart), .busy (dbusy),
    .cmd (dram_cmd), .cmd_bank (dram_bank), .cmd_row (dram_row),
    .cmd_col (dram_col), .dq (dram_dq),
    .wr_valid, .wr_bank, .wr_way, .wr_word, .wr_data,
    .act_count, .rd_count, .burst_count
  );

  sram_ag_ctrl #(.LINES(LINES)) u_sag (
    .clk, .rst_n,
    .wr_valid, .wr_bank, .wr_way, .wr_word, .wr_data,
    .rd_valid, .rd_ready, .rd_bank, .rd_way, .rd_valid_q, .rd_line,
    .s_ce, .s_we, .s_addr, .s_wdata, .s_rdata
  );

  interpolator u_interp (
    .clk, .rst_n,
    .start (blk_valid && blk_ready), .ready (interp_ready),
    .x0 (blk_x0), .y0 (blk_y0), .bw (blk_w - 5'd5), .bh (blk_h - 5'd5),
    .fx (blk_fx), .fy (blk_fy),
    .line_valid (out_valid), .line_data (out_line), .line_x (out_x), .line_y (out_y),
    .line_last (out_last),
    .pix_valid, .pix, .pix_x, .pix_y, .pix_last
  );

  sram_set #(.LINES(LINES)) u_sram (
    .clk,
    .ce (s_ce), .we (s_we), .addr (s_addr), .wdata (s_wdata), .rdata (s_rdata)
  );

endmodule
