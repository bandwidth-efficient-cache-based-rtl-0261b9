// tb_mc_workload: the fetch engine on CIF (352x288) pictures, with the
// coding structures IPPP and IBBBP. The engine is built for a 352x288
// frame (FRAME_W/FRAME_H) and the reference models use the same size.
//
// The top and bottom macroblock rows are decoded in raster order, once with
// P macroblocks (one list-0 reference among RefIdx 0..4) and once with B
// macroblocks (two of three bi-predicted: list 0 = RefIdx 0..4, list 1 =
// RefIdx 5..9). Each macroblock takes a random partition (16x16, 16x8,
// 8x16 or 8x8) with a smooth random motion field, so windows reach past
// the frame border and are served from clamped addresses. Every line, every
// predicted pixel and the hit/miss count of every window are checked as in
// the 1080p end-to-end test, and no SDRAM timing rule may be broken. It
// reports, per coding structure, cycles, lines hit, bytes loaded and ACTs
// per macroblock and the average burst length. 720p differs from this only
// in FRAME_W/FRAME_H; 1080p is the end-to-end test.
module tb_mc_workload;
  import mc_pkg::*;
  import tb_mc_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                     mb_valid = 0, mb_ready;
  logic [MB_W-1:0]          mb_x = 0, mb_y = 0;
  logic                     blk_valid = 0, blk_ready;
  logic [REFIDX_W-1:0]      blk_refidx = 0;
  logic signed [POS_W-1:0]  blk_x0 = 0, blk_y0 = 0;
  logic [4:0]               blk_w = 0, blk_h = 0;
  logic [1:0]               blk_fx = 0, blk_fy = 0;
  logic                     pix_valid, pix_last;
  logic [7:0]               pix;
  logic [3:0]               pix_x, pix_y;
  dram_cmd_e                dram_cmd;
  logic [DBANK_W-1:0]       dram_bank;
  logic [DROW_W-1:0]        dram_row;
  logic [DCOL_W-1:0]        dram_col;
  logic [WORD_W-1:0]        dram_dq;
  logic                     out_valid, out_last;
  logic [LINE_W-1:0]        out_line;
  logic signed [POS_W-1:0]  out_x, out_y;
  logic [31:0]              hit_count, miss_count, act_count, rd_count, burst_count;
  int                       dram_errors;

  localparam int WL_W = 352, WL_H = 288;   // CIF
  mc_top #(.FRAME_W(WL_W), .FRAME_H(WL_H)) dut (.*);

  sdram_model u_mem (
    .clk, .rst_n, .cmd (dram_cmd), .bank (dram_bank), .row (dram_row),
    .col (dram_col), .dq (dram_dq), .errors (dram_errors)
  );

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", msg);
    end
  endtask

  // watchdog
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- SDRAM command monitor: hidden precharge/activate and long bursts
  int  hidden_prep = 0, long_bursts = 0;
  int  last_rd_bank = -1, last_rd_row = -1, last_rd_col = -10, run_len = 0;
  bit  prep_seen = 0;
  always @(posedge clk) if (rst_n) begin
    if (dram_cmd == DCMD_PRE || dram_cmd == DCMD_ACT) begin
      if (last_rd_bank >= 0 && int'(dram_bank) != last_rd_bank) prep_seen = 1;
    end else if (dram_cmd == DCMD_RD) begin
      if (prep_seen && int'(dram_bank) == last_rd_bank) hidden_prep++;
      prep_seen = 0;
      if (int'(dram_bank) == last_rd_bank && int'(dram_row) == last_rd_row &&
          int'(dram_col) == last_rd_col + 1) run_len++;
      else begin
        if (run_len >= 4) long_bursts++;
        run_len = 1;
      end
      last_rd_bank = int'(dram_bank);
      last_rd_row  = int'(dram_row);
      last_rd_col  = int'(dram_col);
    end
  end

  CacheModel model;
  int frac2d = 0;
  int intra_hits = 0, inter_hits = 0, resets = 0, multi_page = 0;

  task automatic start_mb(int mx, int my);
    while (!mb_ready) @(posedge clk);
    mb_valid <= 1; mb_x <= MB_W'(mx); mb_y <= MB_W'(my);
    @(posedge clk);
    mb_valid <= 0;
    if (mx == 0) begin model.reset_tags(); resets++; end
    else model.next_mb();
  endtask

  task automatic run_window(int mx, int my, int refidx, int x0, int y0, int w, int h,
                            bit first_in_mb);
    int gotp, pix_bad;
    int lx0, lx1, ly0, ly1, nl, exp_hits, exp_miss, got, t_first, t_last, cyc;
    int h0, m0, a0, r0, npages;
    int px [$], py [$];
    int pages [$];
    logic [63:0] e0, e1;
    h0 = int'(hit_count); m0 = int'(miss_count); a0 = int'(act_count); r0 = int'(rd_count);
    lx0 = fdiv(x0, 8); lx1 = fdiv(x0 + w - 1, 8);
    ly0 = fdiv(y0, 2); ly1 = fdiv(y0 + h - 1, 2);
    exp_hits = 0; exp_miss = 0;
    for (int lx = lx0; lx <= lx1; lx++)
      for (int ly = ly0; ly <= ly1; ly++) begin
        px.push_back(lx * 8); py.push_back(ly * 2);
        if (model.access(refidx, lx, ly)) exp_hits++;
        else begin
          ref_addr_t a;
          int pg;
          bit found;
          exp_miss++;
          a = ref_map(refidx, mx * 16 + lx * 8, my * 16 + ly * 2);
          pg = a.bank * 65536 + a.row;
          found = 0;
          foreach (pages[i]) if (pages[i] == pg) found = 1;
          if (!found) pages.push_back(pg);
        end
      end
    model.unlock_all();
    nl = px.size();
    npages = pages.size();

    while (!blk_ready) @(posedge clk);
    blk_valid <= 1; blk_refidx <= REFIDX_W'(refidx);
    blk_x0 <= POS_W'(x0); blk_y0 <= POS_W'(y0); blk_w <= 5'(w); blk_h <= 5'(h);
    blk_fx <= 2'($urandom); blk_fy <= 2'($urandom);
    @(posedge clk);
    blk_valid <= 0;
    got = 0; t_first = 0; t_last = 0; cyc = 0; gotp = 0; pix_bad = 0;
    while ((got < nl || gotp < (w - 5) * (h - 5)) && cyc < 5000) begin
      @(posedge clk);
      cyc++;
      if (pix_valid) begin
        int ex, ey, e;
        ex = gotp % (w - 5); ey = gotp / (w - 5);
        e = luma_interp(refidx, mx * 16 + x0 + 2 + ex, my * 16 + y0 + 2 + ey,
                        int'(blk_fx), int'(blk_fy));
        if (int'(pix_x) != ex || int'(pix_y) != ey || int'(pix) != e ||
            pix_last != (gotp == (w - 5) * (h - 5) - 1)) pix_bad++;
        gotp++;
      end
      if (out_valid) begin
        if (got == 0) t_first = cyc;
        t_last = cyc;
        e0 = pix_word(refidx, mx * 16 + px[got], my * 16 + py[got]);
        e1 = pix_word(refidx, mx * 16 + px[got], my * 16 + py[got] + 1);
        check(int'(out_x) == px[got] && int'(out_y) == py[got],
              $sformatf("line %0d position (%0d,%0d) expected (%0d,%0d)", got,
                        out_x, out_y, px[got], py[got]));
        check(out_line == {e1, e0}, $sformatf("line %0d data mb(%0d,%0d) ref %0d (%0d,%0d)",
              got, mx, my, refidx, px[got], py[got]));
        check(out_last == (got == nl - 1), "out_last");
        got++;
      end
    end
    check(got == nl, $sformatf("window gave %0d of %0d lines", got, nl));
    check(gotp == (w - 5) * (h - 5), $sformatf("window gave %0d pixels", gotp));
    check(pix_bad == 0, $sformatf("%0d wrong predicted pixels, window mb(%0d,%0d) (%0d,%0d) q(%0d,%0d)",
          pix_bad, mx, my, x0, y0, blk_fx, blk_fy));
    if (blk_fx != 0 && blk_fy != 0) frac2d++;
    check(t_last - t_first == nl - 1, "one line per cycle");
    @(posedge clk);
    check(int'(hit_count) - h0 == exp_hits, $sformatf("hits %0d expected %0d",
          int'(hit_count) - h0, exp_hits));
    check(int'(miss_count) - m0 == exp_miss, $sformatf("misses %0d expected %0d",
          int'(miss_count) - m0, exp_miss));
    check(int'(rd_count) - r0 == 2 * exp_miss, "two reads per miss");
    check(int'(act_count) - a0 <= npages, $sformatf("ACTs %0d for %0d pages",
          int'(act_count) - a0, npages));
    if (exp_hits > 0 && first_in_mb && mx > 0) inter_hits++;
    if (exp_hits > 0 && !first_in_mb) intra_hits++;
    if (npages > 1) multi_page++;
  endtask

  // per coding structure: cycles, misses, ACTs, reads, bursts, macroblocks
  int cyc_now = 0;
  always @(posedge clk) cyc_now++;
  int st_cyc [2], st_miss [2], st_hit [2], st_act [2], st_rd [2], st_bur [2], st_mb [2];
  int clamped = 0, bipred = 0;

  // one partition: a window per prediction list (two for bi-prediction)
  task automatic partition(int mx, int my, bit bi, int l0, int l1, int px0, int py0,
                           int pw, int ph, int mvx, int mvy, bit first);
    int x0, y0;
    x0 = px0 + mvx - 2; y0 = py0 + mvy - 2;
    if (mx * 16 + x0 < 0 || my * 16 + y0 < 0 || mx * 16 + x0 + pw + 5 > WL_W ||
        my * 16 + y0 + ph + 5 > WL_H) clamped++;
    run_window(mx, my, l0, x0, y0, pw + 5, ph + 5, first);
    if (bi) begin
      bipred++;
      // the list-1 motion vector mirrors the list-0 one, as for a B picture
      // between its two references
      x0 = px0 - mvx - 2; y0 = py0 - mvy - 2;
      run_window(mx, my, l1, x0, y0, pw + 5, ph + 5, 0);
    end
  endtask

  initial begin
    int mode, l0, l1, mvx, mvy, bmvx, bmvy, c0, h0, m0, a0, r0, b0;
    bit bi;
    FW = WL_W;
    FH = WL_H;
    model = new();
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (2) @(posedge clk);
    // st = 0: IPPP (P macroblocks, one list-0 reference among 0..4)
    // st = 1: IBBBP (B macroblocks, list 0 = RefIdx 0..4, list 1 = RefIdx 5..9)
    for (int st = 0; st < 2; st++)
      for (int k = 0; k < 2; k++) begin
        int my;
        my = (k == 0) ? 0 : 17;          // top and bottom macroblock rows of CIF
        bmvx = int'($urandom_range(0, 16)) - 8;
        bmvy = int'($urandom_range(0, 16)) - 8;
        for (int mx = 0; mx < WL_W / 16; mx++) begin
          start_mb(mx, my);
          c0 = cyc_now; h0 = int'(hit_count); m0 = int'(miss_count);
          a0 = int'(act_count); r0 = int'(rd_count); b0 = int'(burst_count);
          // a smooth motion field that drifts along the row
          bmvx += int'($urandom_range(0, 4)) - 2;
          bmvy += int'($urandom_range(0, 4)) - 2;
          if (bmvx > 12) bmvx = 12;
          if (bmvx < -12) bmvx = -12;
          if (bmvy > 12) bmvy = 12;
          if (bmvy < -12) bmvy = -12;
          mode = int'($urandom_range(0, 3));
          l0 = ($urandom_range(0, 3) == 0) ? int'($urandom_range(1, 4)) : 0;
          l1 = 5 + (($urandom_range(0, 3) == 0) ? int'($urandom_range(1, 4)) : 0);
          bi = (st == 1) && ($urandom_range(0, 2) != 0);
          for (int p = 0; p < (mode == 0 ? 1 : mode == 3 ? 4 : 2); p++) begin
            int pw, ph, px0, py0;
            pw  = (mode == 0 || mode == 1) ? 16 : 8;
            ph  = (mode == 0 || mode == 2) ? 16 : 8;
            px0 = (mode == 2 || mode == 3) ? (p % 2) * 8 : 0;
            py0 = (mode == 1) ? p * 8 : (mode == 3) ? (p / 2) * 8 : 0;
            mvx = bmvx + int'($urandom_range(0, 2)) - 1;
            mvy = bmvy + int'($urandom_range(0, 2)) - 1;
            partition(mx, my, bi, l0, l1, px0, py0, pw, ph, mvx, mvy, p == 0);
          end
          st_cyc[st]  += cyc_now - c0;
          st_hit[st]  += int'(hit_count) - h0;
          st_miss[st] += int'(miss_count) - m0;
          st_act[st]  += int'(act_count) - a0;
          st_rd[st]   += int'(rd_count) - r0;
          st_bur[st]  += int'(burst_count) - b0;
          st_mb[st]++;
        end
      end
    repeat (5) @(posedge clk);
    check(dram_errors == 0, $sformatf("SDRAM timing errors: %0d", dram_errors));
    for (int st = 0; st < 2; st++)
      $display("%s: %0d macroblocks, %0d cycles/MB, %0d of %0d lines hit, %0d bytes loaded/MB, %0.2f ACT/MB, avg burst %0.2f words",
               st == 0 ? "IPPP " : "IBBBP", st_mb[st], st_cyc[st] / st_mb[st],
               st_hit[st], st_hit[st] + st_miss[st], st_miss[st] * 16 / st_mb[st],
               real'(st_act[st]) / real'(st_mb[st]), real'(st_rd[st]) / real'(st_bur[st]));
    $display("windows reaching outside the frame %0d, bi-predicted partitions %0d",
             clamped, bipred);
    check(clamped > 0, "no window reached outside the frame");
    check(bipred > 0, "no bi-predicted partition");
    check(intra_hits > 0, "intra-MB reuse never happened");
    check(inter_hits > 0, "inter-MB reuse never happened");
    check(multi_page > 0, "no window crossed an SDRAM row");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
