// data_fetch_ctrl: data fetch and cache controller of the motion
// compensation engine.
//
// A request names a reference window: reference index, top-left integer
// pixel (x0, y0) relative to the current macroblock and its size w x h (for
// an X x Y block with a fractional motion vector the window is
// (X+5) x (Y+5) pixels because of the 6-tap filter). The controller covers
// the window with cache lines (8 pixels x 2 rows) and handles it in three
// phases, one line per cycle, column by column, top to bottom:
//   LOOKUP: check the line's bank. A hit locks the line. A miss allocates
//           the replacement victim (tags written, Lock = 1) and queues a
//           two-word fill, addressed by dram_addr_map, at the DRAM
//           controller. A line is therefore fetched from DRAM only if no
//           earlier block of this or an earlier macroblock left it in the
//           cache (intra- and inter-macroblock reuse).
//   FILL:   start the DRAM controller and wait until every fill is written
//           into the SRAMs.
//   READ:   look every line up again (all hit, since locked lines cannot
//           be replaced), read it from the SRAMs, release its Lock and send
//           it to the interpolator with its relative position. out_valid
//           follows the read by one cycle; there is no back-pressure.
// Macroblock start (mb_valid with mb_x, mb_y): at mb_x = 0 (new macroblock
// row or frame) all tags are reset, otherwise every X-tag moves one block
// to the left. Lines of the 16x16 block containing the current macroblock
// have X-tag = Y-tag = 0.
// The phase order, window interface and no-back-pressure output are this
// design's choices; the document gives check-cache-before-DRAM, locking,
// tag layout and tag update.
module data_fetch_ctrl
  import mc_pkg::*;
#(
  parameter int unsigned FRAME_W = 1920,
  parameter int unsigned FRAME_H = 1080
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // macroblock start
  input  logic                     mb_valid,
  output logic                     mb_ready,
  input  logic [MB_W-1:0]          mb_x,
  input  logic [MB_W-1:0]          mb_y,
  // reference window request
  input  logic                     blk_valid,
  output logic                     blk_ready,
  input  logic [REFIDX_W-1:0]      blk_refidx,
  input  logic signed [POS_W-1:0]  blk_x0,
  input  logic signed [POS_W-1:0]  blk_y0,
  input  logic [4:0]               blk_w,
  input  logic [4:0]               blk_h,
  // cache tags
  output logic [BANK_W-1:0]        lk_bank,
  output logic [REFIDX_W-1:0]      lk_refidx,
  output logic signed [TAG_W-1:0]  lk_xtag,
  output logic signed [TAG_W-1:0]  lk_ytag,
  input  logic                     hit,
  input  logic [WAY_W-1:0]         hit_way,
  output logic                     lock_set,
  output logic                     alloc,
  input  logic                     alloc_ready,
  input  logic [WAY_W-1:0]         alloc_way,
  output logic                     unlock,
  output logic [BANK_W-1:0]        unlock_bank,
  output logic [WAY_W-1:0]         unlock_way,
  output logic                     next_mb,
  output logic                     reset_tags,
  // DRAM controller
  output logic                     dreq_valid,
  input  logic                     dreq_ready,
  output line_req_t                dreq,
  output logic                     dstart,
  input  logic                     dbusy,
  // SRAM controller read port
  output logic                     rd_valid,
  input  logic                     rd_ready,
  output logic [BANK_W-1:0]        rd_bank,
  output logic [WAY_W-1:0]         rd_way,
  input  logic                     rd_valid_q,
  input  logic [LINE_W-1:0]        rd_line,
  // to the interpolator
  output logic                     out_valid,
  output logic [LINE_W-1:0]        out_line,
  output logic signed [POS_W-1:0]  out_x,
  output logic signed [POS_W-1:0]  out_y,
  output logic                     out_last,
  // statistics
  output logic [31:0]              hit_count,
  output logic [31:0]              miss_count
);

  typedef enum logic [2:0] {S_IDLE, S_LOOKUP, S_FILL_START, S_FILL_WAIT,
                            S_READ, S_DRAIN} state_e;
  state_e state;

  logic [REFIDX_W-1:0]      refidx_q;
  logic [MB_W-1:0]          mbx_q, mby_q;
  logic signed [6:0]        lx0, lx1, lx;   // line column = x >>> 3
  logic signed [8:0]        ly0, ly1, ly;   // line row    = y >>> 1
  logic                     any_miss;
  logic signed [POS_W-1:0]  px, py;
  logic                     last_line;

  assign px        = POS_W'(lx) <<< 3;
  assign py        = POS_W'(ly) <<< 1;
  assign last_line = (lx == lx1) && (ly == ly1);

  // line -> bank and tags (bank = 2 * y[3:1] + x[3])
  assign lk_bank   = {ly[2:0], lx[0]};
  assign lk_refidx = refidx_q;
  assign lk_xtag   = lx[6:1];
  assign lk_ytag   = ly[8:3];

  // DRAM addresses of the two words of the line
  logic signed [12:0] abs_x, abs_y;
  dram_addr_t         a0, a1;
  assign abs_x = 13'(signed'({1'b0, mbx_q, 4'b0000})) + 13'(px);
  assign abs_y = 13'(signed'({1'b0, mby_q, 4'b0000})) + 13'(py);

  dram_addr_map #(.FRAME_W(FRAME_W), .FRAME_H(FRAME_H)) u_map0 (
    .refidx(refidx_q), .x(abs_x), .y(abs_y), .addr(a0));
  dram_addr_map #(.FRAME_W(FRAME_W), .FRAME_H(FRAME_H)) u_map1 (
    .refidx(refidx_q), .x(abs_x), .y(abs_y + 13'sd1), .addr(a1));

  assign dreq = '{bank: a0.bank, row: a0.row, col0: a0.col, col1: a1.col,
                  cbank: lk_bank, cway: alloc_way};

  // phase actions
  logic step;
  always_comb begin
    lock_set    = 1'b0;
    alloc       = 1'b0;
    dreq_valid  = 1'b0;
    rd_valid    = 1'b0;
    unlock      = 1'b0;
    unlock_bank = lk_bank;
    unlock_way  = hit_way;
    rd_bank     = lk_bank;
    rd_way      = hit_way;
    step        = 1'b0;
    unique case (state)
      S_LOOKUP: begin
        if (hit) begin
          lock_set = 1'b1;
          step     = 1'b1;
        end else if (alloc_ready) begin
          // the fill is offered as soon as a victim exists; the line is
          // allocated in the cycle the DRAM controller takes it
          dreq_valid = 1'b1;
          alloc      = dreq_ready;
          step       = dreq_ready;
        end
      end
      S_READ: begin
        rd_valid = 1'b1;
        if (rd_ready) begin
          unlock = 1'b1;
          step   = 1'b1;
        end
      end
      default: ;
    endcase
  end

  assign blk_ready  = (state == S_IDLE) && !mb_valid;
  assign mb_ready   = (state == S_IDLE);
  assign next_mb    = mb_valid && mb_ready && (mb_x != '0);
  assign reset_tags = mb_valid && mb_ready && (mb_x == '0);
  assign dstart     = (state == S_FILL_START);

  logic signed [POS_W-1:0] x_end, y_end;
  assign x_end = blk_x0 + signed'(POS_W'(blk_w)) - POS_W'(1);
  assign y_end = blk_y0 + signed'(POS_W'(blk_h)) - POS_W'(1);

  logic                    pend_out, pend_last;
  logic signed [POS_W-1:0] pend_x, pend_y;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      refidx_q   <= '0;
      mbx_q      <= '0;
      mby_q      <= '0;
      lx0 <= '0; lx1 <= '0; lx <= '0;
      ly0 <= '0; ly1 <= '0; ly <= '0;
      any_miss   <= 1'b0;
      hit_count  <= '0;
      miss_count <= '0;
      pend_out   <= 1'b0;
      pend_last  <= 1'b0;
      pend_x     <= '0;
      pend_y     <= '0;
    end else begin
      pend_out <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (mb_valid) begin
            mbx_q <= mb_x;
            mby_q <= mb_y;
          end else if (blk_valid) begin
            refidx_q <= blk_refidx;
            lx0 <= 7'(blk_x0 >>> 3);
            lx  <= 7'(blk_x0 >>> 3);
            lx1 <= 7'(x_end >>> 3);
            ly0 <= 9'(blk_y0 >>> 1);
            ly  <= 9'(blk_y0 >>> 1);
            ly1 <= 9'(y_end >>> 1);
            any_miss <= 1'b0;
            state    <= S_LOOKUP;
          end
        end
        S_LOOKUP: begin
          if (step) begin
            if (hit) hit_count  <= hit_count + 1;
            else begin
              miss_count <= miss_count + 1;
              any_miss   <= 1'b1;
            end
            if (last_line) begin
              lx    <= lx0;
              ly    <= ly0;
              state <= (any_miss || !hit) ? S_FILL_START : S_READ;
            end else if (ly == ly1) begin
              ly <= ly0;
              lx <= lx + 7'sd1;
            end else begin
              ly <= ly + 9'sd1;
            end
          end
        end
        S_FILL_START: state <= S_FILL_WAIT;
        S_FILL_WAIT:  if (!dbusy) state <= S_READ;
        S_READ: begin
          if (step) begin
            pend_out  <= 1'b1;
            pend_last <= last_line;
            pend_x    <= px;
            pend_y    <= py;
            if (last_line) state <= S_DRAIN;
            else if (ly == ly1) begin
              ly <= ly0;
              lx <= lx + 7'sd1;
            end else begin
              ly <= ly + 9'sd1;
            end
          end
        end
        S_DRAIN: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign out_valid = rd_valid_q && pend_out;
  assign out_line  = rd_line;
  assign out_x     = pend_x;
  assign out_y     = pend_y;
  assign out_last  = pend_last;

  // every line read back in the READ phase must still be in the cache
  a_read_hits: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_READ) |-> hit);
  // a fill request stays up, unchanged, until it is taken
  a_dreq_hold: assert property (@(posedge clk) disable iff (!rst_n)
    dreq_valid && !dreq_ready |=> dreq_valid && $stable(dreq));

endmodule
