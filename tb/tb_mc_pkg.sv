// tb_mc_pkg: reference functions shared by the testbenches of the motion
// compensation fetch engine, written independently of the RTL.
//   dram_word  : content of an SDRAM word (a hash of bank, row, column)
//   ref_map    : pixel position -> SDRAM bank/row/column (64x32 quadrants,
//                2x2 quadrants per tile, tiles in raster order, vertical word
//                order inside a quadrant, clamping at the frame border)
//   luma_interp: H.264 luma quarter-sample interpolation on those pixels
//   CacheModel : the 16-bank, 6-way cache with Lock and FIFO replacement
//                that skips locked lines, relative tags and tag update
package tb_mc_pkg;

  // frame size of the reference frames; a testbench of another frame size
  // sets these before its first access
  int FW = 1920;
  int FH = 1080;

  typedef struct {
    int bank;
    int row;
    int col;
  } ref_addr_t;

  function automatic logic [63:0] dram_word(int bank, int row, int col);
    logic [63:0] k;
    k = 64'(bank) << 40 | 64'(row) << 16 | 64'(col);
    return (k * 64'h9E3779B97F4A7C15) ^ (k << 7) ^ 64'h0123_4567_89AB_CDEF;
  endfunction

  function automatic ref_addr_t ref_map(int refidx, int x, int y);
    ref_addr_t a;
    int tiles_x, tiles_y;
    if (x < 0) x = 0;
    if (x >= FW) x = FW - 1;
    if (y < 0) y = 0;
    if (y >= FH) y = FH - 1;
    tiles_x = (FW + 127) >> 7;
    tiles_y = (FH + 63) >> 6;
    a.bank = ((y >> 5) & 1) * 2 + ((x >> 6) & 1);
    a.row  = refidx * tiles_x * tiles_y + (y >> 6) * tiles_x + (x >> 7);
    a.col  = ((x >> 3) & 7) * 32 + (y & 31);
    return a;
  endfunction

  function automatic logic [63:0] pix_word(int refidx, int x, int y);
    ref_addr_t a;
    a = ref_map(refidx, x, y);
    return dram_word(a.bank, a.row, a.col);
  endfunction

  // floor division for negative numbers (declared before use below)
  function automatic int fdiv0(int a, int b);
    int q;
    q = a / b;
    if ((a % b != 0) && ((a < 0) != (b < 0))) q = q - 1;
    return q;
  endfunction

  // one reference pixel as the engine sees it: byte x mod 8 of the word
  // covering column x (words are clamped to the frame, pixel 0 in bits 7:0)
  function automatic int ref_pixel(int refidx, int x, int y);
    logic [63:0] w;
    int wx;
    wx = fdiv0(x, 8) * 8;
    w  = pix_word(refidx, wx, y);
    return int'(w[8 * (x - wx) +: 8]);
  endfunction

  function automatic int clip255(int v);
    return v < 0 ? 0 : (v > 255 ? 255 : v);
  endfunction

  // H.264 luma sample at integer position (x, y) plus quarter fraction
  function automatic int luma_interp(int rf, int x, int y, int qx, int qy);
    int P [6][6];
    int hs [6], vs0, vs1, jj, G, Hh, M, b, s, h, m, j;
    for (int r = 0; r < 6; r++)
      for (int c = 0; c < 6; c++) P[r][c] = ref_pixel(rf, x + c - 2, y + r - 2);
    for (int r = 0; r < 6; r++)
      hs[r] = P[r][0] - 5 * P[r][1] + 20 * P[r][2] + 20 * P[r][3] - 5 * P[r][4] + P[r][5];
    vs0 = P[0][2] - 5 * P[1][2] + 20 * P[2][2] + 20 * P[3][2] - 5 * P[4][2] + P[5][2];
    vs1 = P[0][3] - 5 * P[1][3] + 20 * P[2][3] + 20 * P[3][3] - 5 * P[4][3] + P[5][3];
    jj  = hs[0] - 5 * hs[1] + 20 * hs[2] + 20 * hs[3] - 5 * hs[4] + hs[5];
    G = P[2][2]; Hh = P[2][3]; M = P[3][2];
    b = clip255((hs[2] + 16) >>> 5);
    s = clip255((hs[3] + 16) >>> 5);
    h = clip255((vs0 + 16) >>> 5);
    m = clip255((vs1 + 16) >>> 5);
    j = clip255((jj + 512) >>> 10);
    case (qy * 4 + qx)
      0: return G;          1: return (G + b + 1) >> 1;  2: return b;  3: return (Hh + b + 1) >> 1;
      4: return (G + h + 1) >> 1;  5: return (b + h + 1) >> 1;  6: return (b + j + 1) >> 1;
      7: return (b + m + 1) >> 1;
      8: return h;          9: return (h + j + 1) >> 1;  10: return j; 11: return (j + m + 1) >> 1;
      12: return (M + h + 1) >> 1; 13: return (h + s + 1) >> 1; 14: return (j + s + 1) >> 1;
      default: return (m + s + 1) >> 1;
    endcase
  endfunction

  // floor division for negative numbers
  function automatic int fdiv(int a, int b);
    int q;
    q = a / b;
    if ((a % b != 0) && ((a < 0) != (b < 0))) q = q - 1;
    return q;
  endfunction

  class CacheModel;
    bit valid [16][6];
    bit lock  [16][6];
    int refi  [16][6];
    int xt    [16][6];
    int yt    [16][6];
    int ptr   [16];
    int evictions;
    int lock_skips;

    function new();
      reset_tags();
      evictions  = 0;
      lock_skips = 0;
    endfunction

    function void reset_tags();
      for (int b = 0; b < 16; b++) begin
        ptr[b] = 0;
        for (int w = 0; w < 6; w++) begin
          valid[b][w] = 0; lock[b][w] = 0; refi[b][w] = 15; xt[b][w] = 0; yt[b][w] = 0;
        end
      end
    endfunction

    function void next_mb();
      for (int b = 0; b < 16; b++)
        for (int w = 0; w < 6; w++) begin
          if (xt[b][w] == -32) begin
            valid[b][w] = 0;
            xt[b][w] = 31;
          end else xt[b][w] = xt[b][w] - 1;
        end
    endfunction

    // One line lookup in LOOKUP order; returns 1 on hit.
    function bit access(int refidx, int lx, int ly);
      int b, xtag, ytag, v;
      b    = (ly & 7) * 2 + (lx & 1);
      xtag = fdiv(lx, 2);
      ytag = fdiv(ly, 8);
      for (int w = 0; w < 6; w++)
        if (valid[b][w] && refi[b][w] == refidx && xt[b][w] == xtag && yt[b][w] == ytag) begin
          lock[b][w] = 1;
          return 1;
        end
      v = -1;
      for (int k = 0; k < 6; k++)
        if (v < 0 && !lock[b][(ptr[b] + k) % 6]) v = (ptr[b] + k) % 6;
      if (v != ptr[b]) lock_skips++;
      if (valid[b][v]) evictions++;
      valid[b][v] = 1; lock[b][v] = 1; refi[b][v] = refidx; xt[b][v] = xtag; yt[b][v] = ytag;
      ptr[b] = (v + 1) % 6;
      return 0;
    endfunction

    function void unlock_all();
      for (int b = 0; b < 16; b++)
        for (int w = 0; w < 6; w++) lock[b][w] = 0;
    endfunction
  endclass

endpackage
