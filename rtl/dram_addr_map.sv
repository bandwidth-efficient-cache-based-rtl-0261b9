// dram_addr_map: reference-frame pixel position -> SDRAM bank/row/column.
//
// Two mappings are stacked, both combinational:
//  * Tile mapping: the frame is cut into tiles of 2x2 quadrants; the four
//    quadrants of a tile sit in the four SDRAM banks at the same row number
//    (bank 0 top left, 1 top right, 2 bottom left, 3 bottom right), and the
//    tiles of a frame take consecutive rows in raster order. Neighbouring
//    quadrants are therefore always in different banks, even across a tile
//    border, which lets a precharge/activate of the next row overlap reads.
//  * Vertical addressing: inside a quadrant (one SDRAM row of QUAD_W/8 x
//    QUAD_H words) the column address runs down a column of 8-pixel words
//    first: col = word_x * QUAD_H + y. A tall access region (the usual shape
//    of a motion-compensation fetch) then reads long runs of consecutive
//    columns, i.e. long bursts.
// Reference frame refidx occupies rows refidx*ROWS_PER_FRAME and up.
// Positions outside the frame are clamped to the nearest inside pixel, which
// replicates the border rows (horizontal clamping is at word granularity).
// Tile and quadrant sizes, the row order and the clamping are this design's
// choices; the document gives the 2x2 bank tile and the vertical word order.
module dram_addr_map
  import mc_pkg::*;
#(
  parameter int unsigned FRAME_W = 1920,
  parameter int unsigned FRAME_H = 1080,
  parameter int unsigned QUAD_W  = 64,    // pixels, multiple of 8
  parameter int unsigned QUAD_H  = 32     // rows; (QUAD_W/8)*QUAD_H = 256 columns
) (
  input  logic [REFIDX_W-1:0] refidx,
  input  logic signed [12:0]  x,          // absolute pixel column
  input  logic signed [12:0]  y,          // absolute pixel row
  output dram_addr_t          addr
);

  localparam int unsigned TILE_W  = 2 * QUAD_W;
  localparam int unsigned TILE_H  = 2 * QUAD_H;
  localparam int unsigned TILES_X = (FRAME_W + TILE_W - 1) / TILE_W;
  localparam int unsigned TILES_Y = (FRAME_H + TILE_H - 1) / TILE_H;
  localparam int unsigned ROWS_PER_FRAME = TILES_X * TILES_Y;

  int xc, yc;

  always_comb begin
    xc = int'(x);
    yc = int'(y);
    if (xc < 0) xc = 0;
    if (xc > int'(FRAME_W) - 1) xc = int'(FRAME_W) - 1;
    if (yc < 0) yc = 0;
    if (yc > int'(FRAME_H) - 1) yc = int'(FRAME_H) - 1;
    addr.bank = DBANK_W'((((yc / int'(QUAD_H)) % 2) * 2) + ((xc / int'(QUAD_W)) % 2));
    addr.row  = DROW_W'(int'(refidx) * int'(ROWS_PER_FRAME)
                        + (yc / int'(TILE_H)) * int'(TILES_X) + xc / int'(TILE_W));
    addr.col  = DCOL_W'(((xc % int'(QUAD_W)) / 8) * int'(QUAD_H) + yc % int'(QUAD_H));
  end

endmodule
