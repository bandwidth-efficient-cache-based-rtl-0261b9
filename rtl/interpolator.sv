// interpolator: luma sub-pixel interpolation of one reference window.
//
// The window of an X x Y block with motion vector fraction (fx, fy) in
// quarter pixels is (X+5) x (Y+5) integer pixels, delivered as the cache
// lines that cover it (8 pixels x 2 rows each, line_x/line_y relative to
// the macroblock like the window origin x0/y0). The lines are stored in a
// WIN_W x WIN_H pixel buffer. Then one predicted pixel is produced per
// cycle, in raster order, from the 6x6 integer neighbourhood of its
// integer position G:
//   half samples  b (horizontal), h (vertical), s (horizontal, next row),
//                 m (vertical, next column): 6-tap (1,-5,20,20,-5,1),
//                 rounded (+16) >> 5 and clipped to 0..255;
//   centre        j: the same filter applied vertically to the six
//                 unrounded horizontal sums, rounded (+512) >> 10, clipped;
//   quarter       the rounded-up mean of the two nearest integer/half
//                 samples, as in the H.264 luma interpolation process.
// Pixel i of a 64-bit cache word is bits 8i+7..8i (i = 0 leftmost).
// Interface: start (with x0, y0, X, Y, fx, fy) while ready; line_valid
// words; after the last line the X*Y pixels follow on pix_valid with their
// position pix_x/pix_y inside the block, pix_last on the final one; ready
// returns the cycle after. Timing: one line per cycle in, one pixel per
// cycle out. The document specifies only the 6-tap filter and the
// (X+5) x (Y+5) window; the filter arithmetic is the H.264 standard's and
// the one-pixel-per-cycle structure is this design's choice.
module interpolator
  import mc_pkg::*;
#(
  parameter int unsigned WIN_W = 32,    // 4 cache lines across
  parameter int unsigned WIN_H = 22     // 11 cache lines down
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  output logic                     ready,
  input  logic signed [POS_W-1:0]  x0,
  input  logic signed [POS_W-1:0]  y0,
  input  logic [4:0]               bw,      // block width X (1..16)
  input  logic [4:0]               bh,      // block height Y (1..16)
  input  logic [1:0]               fx,
  input  logic [1:0]               fy,
  input  logic                     line_valid,
  input  logic [LINE_W-1:0]        line_data,
  input  logic signed [POS_W-1:0]  line_x,
  input  logic signed [POS_W-1:0]  line_y,
  input  logic                     line_last,
  output logic                     pix_valid,
  output logic [7:0]               pix,
  output logic [3:0]               pix_x,
  output logic [3:0]               pix_y,
  output logic                     pix_last
);

  typedef enum logic [1:0] {I_IDLE, I_LOAD, I_CALC} istate_e;
  istate_e state;

  logic [7:0]              win [WIN_H][WIN_W];
  logic signed [POS_W-1:0] bx, by;          // window buffer origin (aligned)
  logic [2:0]              xoff;
  logic                    yoff;
  logic [4:0]              w_q, h_q;
  logic [1:0]              fx_q, fy_q;
  logic [3:0]              cx, cy;

  assign ready = (state == I_IDLE);

  // ---- store lines
  logic signed [POS_W-1:0] rel_x, rel_y;
  logic [1:0]              lcol;
  logic [4:0]              lrow;
  assign rel_x = line_x - bx;
  assign rel_y = line_y - by;
  assign lcol  = rel_x[4:3];
  assign lrow  = rel_y[4:0];

  // ---- 6x6 neighbourhood of the current integer position
  function automatic logic [7:0] clip8(logic signed [21:0] v);
    if (v < 22'sd0)   return 8'd0;
    if (v > 22'sd255) return 8'd255;
    return 8'(v);
  endfunction

  function automatic logic [7:0] avg(logic [7:0] a, logic [7:0] c);
    logic [8:0] sum;
    sum = {1'b0, a} + {1'b0, c} + 9'd1;
    return sum[8:1];
  endfunction

  // 22-bit signed covers the second (vertical) pass over horizontal sums
  function automatic logic signed [21:0] tap6(logic signed [21:0] e, logic signed [21:0] f,
      logic signed [21:0] g, logic signed [21:0] h, logic signed [21:0] i, logic signed [21:0] j);
    return e - 22'sd5 * f + 22'sd20 * g + 22'sd20 * h - 22'sd5 * i + j;
  endfunction

  logic [7:0] p [6][6];    // p[r][c]: window rows cy+yoff+r, columns cx+xoff+c
  logic signed [21:0] b1 [6];   // horizontal sums per row
  logic signed [21:0] h1, m1, j1;
  logic [7:0] G, H, M, b, s, h, m, j, res;

  always_comb begin
    for (int r = 0; r < 6; r++)
      for (int c = 0; c < 6; c++)
        p[r][c] = win[5'(cy) + 5'(yoff) + 5'(r)][5'(cx) + 5'(xoff) + 5'(c)];
    for (int r = 0; r < 6; r++)
      b1[r] = tap6(22'(p[r][0]), 22'(p[r][1]), 22'(p[r][2]), 22'(p[r][3]), 22'(p[r][4]), 22'(p[r][5]));
    h1 = tap6(22'(p[0][2]), 22'(p[1][2]), 22'(p[2][2]), 22'(p[3][2]), 22'(p[4][2]), 22'(p[5][2]));
    m1 = tap6(22'(p[0][3]), 22'(p[1][3]), 22'(p[2][3]), 22'(p[3][3]), 22'(p[4][3]), 22'(p[5][3]));
    j1 = tap6(b1[0], b1[1], b1[2], b1[3], b1[4], b1[5]);
    G = p[2][2];
    H = p[2][3];
    M = p[3][2];
    b = clip8((b1[2] + 22'sd16) >>> 5);
    s = clip8((b1[3] + 22'sd16) >>> 5);
    h = clip8((h1 + 22'sd16) >>> 5);
    m = clip8((m1 + 22'sd16) >>> 5);
    j = clip8((j1 + 22'sd512) >>> 10);
    unique case ({fx_q, fy_q})
      4'b00_00: res = G;
      4'b00_01: res = avg(G, h);
      4'b00_10: res = h;
      4'b00_11: res = avg(M, h);
      4'b01_00: res = avg(G, b);
      4'b10_00: res = b;
      4'b11_00: res = avg(H, b);
      4'b01_01: res = avg(b, h);
      4'b11_01: res = avg(b, m);
      4'b01_11: res = avg(h, s);
      4'b11_11: res = avg(m, s);
      4'b10_01: res = avg(b, j);
      4'b10_11: res = avg(j, s);
      4'b01_10: res = avg(h, j);
      4'b11_10: res = avg(j, m);
      default:  res = j;    // 10_10
    endcase
  end

  logic last_pix;
  assign last_pix = (5'(cx) == w_q - 5'd1) && (5'(cy) == h_q - 5'd1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= I_IDLE;
      bx <= '0; by <= '0; xoff <= '0; yoff <= '0;
      w_q <= '0; h_q <= '0; fx_q <= '0; fy_q <= '0;
      cx <= '0; cy <= '0;
      pix_valid <= 1'b0;
      pix       <= '0;
      pix_x     <= '0;
      pix_y     <= '0;
      pix_last  <= 1'b0;
    end else begin
      pix_valid <= 1'b0;
      pix_last  <= 1'b0;
      unique case (state)
        I_IDLE: if (start) begin
          bx    <= {x0[POS_W-1:3], 3'b000};
          by    <= {y0[POS_W-1:1], 1'b0};
          xoff  <= x0[2:0];
          yoff  <= y0[0];
          w_q   <= bw;
          h_q   <= bh;
          fx_q  <= fx;
          fy_q  <= fy;
          cx    <= '0;
          cy    <= '0;
          state <= I_LOAD;
        end
        I_LOAD: if (line_valid) begin
          for (int i = 0; i < 8; i++) begin
            win[lrow][{lcol, 3'(i)}]     <= line_data[8 * i +: 8];
            win[lrow + 1][{lcol, 3'(i)}] <= line_data[WORD_W + 8 * i +: 8];
          end
          if (line_last) state <= I_CALC;
        end
        I_CALC: begin
          pix_valid <= 1'b1;
          pix       <= res;
          pix_x     <= cx;
          pix_y     <= cy;
          pix_last  <= last_pix;
          if (last_pix) state <= I_IDLE;
          else if (5'(cx) == w_q - 5'd1) begin
            cx <= '0;
            cy <= cy + 1'b1;
          end else begin
            cx <= cx + 1'b1;
          end
        end
        default: state <= I_IDLE;
      endcase
    end
  end

endmodule
