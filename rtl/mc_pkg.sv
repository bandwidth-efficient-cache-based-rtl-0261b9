// mc_pkg: shared constants and types of the cache-based motion-compensation
// reference fetch engine.
//
// Cache organisation: a reference frame is cut into 16x16 blocks; each block
// holds 16 cache lines of 8 pixels x 2 rows, one line per cache bank, so the
// bank of a line follows from its position inside the 16x16 block. A cache
// word is one 8-pixel row segment (64 bits, the external bus width); a line
// is two vertically adjacent words. Each bank holds WAYS lines.
//
// Positions are 10-bit signed pixel coordinates relative to the macroblock
// being decoded: x[9:4] is the X-tag, x[3] the bank X offset, x[2:0] the
// pixel; y[9:4] is the Y-tag, y[3:1] the bank Y offset, y[0] the word in
// the line.
//
// DRAM side: a 4-bank SDRAM with 4096 rows of 256 64-bit columns.
package mc_pkg;

  localparam int unsigned NUM_BANKS  = 16;   // cache banks
  localparam int unsigned WAYS       = 6;    // lines per bank
  localparam int unsigned WORD_W     = 64;   // cache word = DRAM bus width
  localparam int unsigned LINE_W     = 2 * WORD_W;
  localparam int unsigned REFIDX_W   = 4;
  localparam int unsigned TAG_W      = 6;
  localparam int unsigned POS_W      = 10;
  localparam int unsigned MB_W       = 7;    // macroblock coordinate width
  localparam logic [REFIDX_W-1:0] REFIDX_INVALID = '1;

  localparam int unsigned BANK_W     = $clog2(NUM_BANKS);
  localparam int unsigned WAY_W      = $clog2(WAYS);

  // SDRAM geometry
  localparam int unsigned DBANK_W    = 2;
  localparam int unsigned DROW_W     = 12;
  localparam int unsigned DCOL_W     = 8;

  // Tag registers of one cache line (Lock 1 bit, RefIdx 4, X-tag 6, Y-tag 6)
  typedef struct packed {
    logic                       lock;
    logic [REFIDX_W-1:0]        refidx;
    logic signed [TAG_W-1:0]    xtag;
    logic signed [TAG_W-1:0]    ytag;
  } line_tag_t;

  typedef struct packed {
    logic [DBANK_W-1:0] bank;
    logic [DROW_W-1:0]  row;
    logic [DCOL_W-1:0]  col;
  } dram_addr_t;

  // One cache-line fill handed to the DRAM controller: the DRAM column of
  // each of its two words and the cache slot that receives them.
  typedef struct packed {
    logic [DBANK_W-1:0] bank;
    logic [DROW_W-1:0]  row;
    logic [DCOL_W-1:0]  col0;
    logic [DCOL_W-1:0]  col1;
    logic [BANK_W-1:0]  cbank;
    logic [WAY_W-1:0]   cway;
  } line_req_t;

  typedef enum logic [1:0] {
    DCMD_NOP = 2'd0,
    DCMD_ACT = 2'd1,
    DCMD_PRE = 2'd2,
    DCMD_RD  = 2'd3
  } dram_cmd_e;

endpackage
