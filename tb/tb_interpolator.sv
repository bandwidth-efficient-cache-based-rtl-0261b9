// tb_interpolator: random reference windows and all 16 quarter-sample
// positions for 4x4, 8x8, 16x16, 16x8 and 8x16 blocks at every alignment of
// the window inside the cache lines. Each predicted pixel is compared with
// a reference computation of the H.264 luma interpolation on the integer
// pixels; the output rate (one pixel per cycle, X*Y cycles) is checked too.
module tb_interpolator;
  import mc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                     start = 0, ready;
  logic signed [POS_W-1:0]  x0 = 0, y0 = 0;
  logic [4:0]               bw = 0, bh = 0;
  logic [1:0]               fx = 0, fy = 0;
  logic                     line_valid = 0, line_last = 0;
  logic [LINE_W-1:0]        line_data = 0;
  logic signed [POS_W-1:0]  line_x = 0, line_y = 0;
  logic                     pix_valid, pix_last;
  logic [7:0]               pix;
  logic [3:0]               pix_x, pix_y;

  interpolator dut (.*);

  int checks = 0, failures = 0;
  int img [int][int];       // img[y][x], pixels around the window

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int clip(int v);
    return v < 0 ? 0 : (v > 255 ? 255 : v);
  endfunction
  function automatic int P(int x, int y);
    return img[y][x];
  endfunction
  function automatic int hs(int x, int y);   // unrounded horizontal half at (x+1/2, y)
    return P(x-2,y) - 5*P(x-1,y) + 20*P(x,y) + 20*P(x+1,y) - 5*P(x+2,y) + P(x+3,y);
  endfunction
  function automatic int vs(int x, int y);   // unrounded vertical half at (x, y+1/2)
    return P(x,y-2) - 5*P(x,y-1) + 20*P(x,y) + 20*P(x,y+1) - 5*P(x,y+2) + P(x,y+3);
  endfunction
  function automatic int expect_pix(int x, int y, int qx, int qy);
    int G, Hh, M, b, h, s, m, j, jj;
    G = P(x, y); Hh = P(x + 1, y); M = P(x, y + 1);
    b = clip((hs(x, y) + 16) >>> 5);
    s = clip((hs(x, y + 1) + 16) >>> 5);
    h = clip((vs(x, y) + 16) >>> 5);
    m = clip((vs(x + 1, y) + 16) >>> 5);
    // centre from the vertical intermediates (same result as from horizontal)
    jj = vs(x-2,y) - 5*vs(x-1,y) + 20*vs(x,y) + 20*vs(x+1,y) - 5*vs(x+2,y) + vs(x+3,y);
    j = clip((jj + 512) >>> 10);
    case (qy * 4 + qx)
      0: return G;          1: return (G + b + 1) >> 1;  2: return b;  3: return (Hh + b + 1) >> 1;
      4: return (G + h + 1) >> 1;  5: return (b + h + 1) >> 1;  6: return (b + j + 1) >> 1;
      7: return (b + m + 1) >> 1;
      8: return h;          9: return (h + j + 1) >> 1;  10: return j; 11: return (j + m + 1) >> 1;
      12: return (M + h + 1) >> 1; 13: return (h + s + 1) >> 1; 14: return (j + s + 1) >> 1;
      default: return (m + s + 1) >> 1;
    endcase
  endfunction

  task automatic run(int X, int Y, int qx, int qy, int wx0, int wy0, int flat);
    int lx0, lx1, ly0, ly1, got, t0, t1, cyc;
    logic [63:0] w0, w1;
    for (int y = wy0 - 2; y < wy0 + Y + 8; y++)
      for (int x = wx0 - 8; x < wx0 + X + 16; x++)
        img[y][x] = flat >= 0 ? flat : int'($urandom_range(0, 255));
    while (!ready) @(posedge clk);
    start <= 1; x0 <= 10'(wx0); y0 <= 10'(wy0); bw <= 5'(X); bh <= 5'(Y);
    fx <= 2'(qx); fy <= 2'(qy);
    @(posedge clk);
    start <= 0;
    lx0 = (wx0 >>> 3); lx1 = ((wx0 + X + 4) >>> 3);
    ly0 = (wy0 >>> 1); ly1 = ((wy0 + Y + 4) >>> 1);
    for (int lx = lx0; lx <= lx1; lx++)
      for (int ly = ly0; ly <= ly1; ly++) begin
        for (int i = 0; i < 8; i++) begin
          w0[8*i +: 8] = 8'(img[ly * 2][lx * 8 + i]);
          w1[8*i +: 8] = 8'(img[ly * 2 + 1][lx * 8 + i]);
        end
        line_valid <= 1; line_data <= {w1, w0}; line_x <= 10'(lx * 8); line_y <= 10'(ly * 2);
        line_last <= (lx == lx1 && ly == ly1);
        @(posedge clk);
      end
    line_valid <= 0; line_last <= 0;
    got = 0; cyc = 0; t0 = 0; t1 = 0;
    while (got < X * Y && cyc < 1000) begin
      @(posedge clk); #1;
      cyc++;
      if (pix_valid) begin
        int ex, ey, e;
        ex = got % X; ey = got / X;
        if (got == 0) t0 = cyc;
        t1 = cyc;
        e = expect_pix(wx0 + 2 + ex, wy0 + 2 + ey, qx, qy);
        checks++;
        if (int'(pix_x) != ex || int'(pix_y) != ey || int'(pix) != e ||
            pix_last != (got == X * Y - 1)) begin
          failures++;
          if (failures < 10)
            $display("FAIL: %0dx%0d q(%0d,%0d) at (%0d,%0d): got %0d at (%0d,%0d) expected %0d",
                     X, Y, qx, qy, wx0, wy0, pix, pix_x, pix_y, e);
        end
        got++;
      end
    end
    checks++;
    if (got != X * Y || t1 - t0 != X * Y - 1) begin
      failures++;
      $display("FAIL: %0d pixels in %0d cycles", got, t1 - t0 + 1);
    end
  endtask

  initial begin
    int sizes [5][2] = '{'{4, 4}, '{8, 8}, '{16, 16}, '{16, 8}, '{8, 16}};
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int q = 0; q < 16; q++)
      for (int k = 0; k < 5; k++)
        run(sizes[k][0], sizes[k][1], q % 4, q / 4, int'($urandom_range(0, 40)) - 20,
            int'($urandom_range(0, 40)) - 20, -1);
    // clipping at both ends
    run(8, 8, 2, 2, 3, 1, 255);
    run(8, 8, 2, 2, 3, 1, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
