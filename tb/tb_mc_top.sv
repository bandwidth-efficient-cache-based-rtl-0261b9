// tb_mc_top: end-to-end test of the motion compensation fetch engine at its
// default parameters (1920x1080 frame, 16 banks x 6 ways, 48-line request
// buffer, TRP = TRCD = 5, CL = 3) against the SDRAM model.
//
// Macroblocks of two macroblock rows are decoded in raster order; each one
// issues the reference windows of a random partition (one 21x21, two 21x13,
// two 13x21 or four 13x13 windows) with small random motion vectors, so
// windows overlap inside a macroblock and across macroblocks, and cross
// SDRAM row boundaries. One further macroblock uses sixteen 4x4 partitions
// (9x9 windows); the cycles per macroblock are reported for each partition
// shape. Macroblocks must be started in raster order, since the cache tags
// are relative to the current macroblock. Every output line is checked for position, order
// and content (the SDRAM words at its two rows), every predicted pixel
// against a reference H.264 luma interpolation with a random quarter-pixel
// fraction, and the hit/miss counts of every window against a software
// model of the cache. Checked besides:
// one output line per cycle, no SDRAM timing breach, 2 reads per miss, and
// at most one ACT per distinct SDRAM page a window misses in. Each
// mechanism must occur at least once: intra- and inter-macroblock hits,
// tag reset at a macroblock row start, eviction, skipping a locked line,
// windows missing in several SDRAM pages, a precharge/activate issued
// between reads of another bank, and bursts of 4 words or more.
module tb_mc_top;
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

  mc_top dut (.*);

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

  // cycles spent per macroblock, by partition shape
  int cyc_now = 0;
  always @(posedge clk) cyc_now++;
  int mb_cyc [5];
  int mb_cnt [5];

  initial begin
    int mode, rf, mvx, mvy, bmvx, bmvy, c0;
    model = new();
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (2) @(posedge clk);
    for (int my = 1; my <= 2; my++) begin
      bmvx = int'($urandom_range(0, 8)) - 4;
      bmvy = int'($urandom_range(0, 8)) - 4;
      for (int mx = 0; mx < 12; mx++) begin
        start_mb(mx, my);
        c0 = cyc_now;
        mode = int'($urandom_range(0, 3));
        rf   = ($urandom_range(0, 5) == 0) ? 1 : 0;
        case (mode)
          0: begin
            mvx = bmvx + int'($urandom_range(0, 4)) - 2;
            mvy = bmvy + int'($urandom_range(0, 4)) - 2;
            run_window(mx, my, rf, mvx - 2, mvy - 2, 21, 21, 1);
          end
          1: for (int p = 0; p < 2; p++) begin
            mvx = bmvx + int'($urandom_range(0, 4)) - 2;
            mvy = bmvy + int'($urandom_range(0, 4)) - 2;
            run_window(mx, my, rf, mvx - 2, p * 8 + mvy - 2, 21, 13, p == 0);
          end
          2: for (int p = 0; p < 2; p++) begin
            mvx = bmvx + int'($urandom_range(0, 4)) - 2;
            mvy = bmvy + int'($urandom_range(0, 4)) - 2;
            run_window(mx, my, rf, p * 8 + mvx - 2, mvy - 2, 13, 21, p == 0);
          end
          default: for (int p = 0; p < 4; p++) begin
            mvx = bmvx + int'($urandom_range(0, 4)) - 2;
            mvy = bmvy + int'($urandom_range(0, 4)) - 2;
            run_window(mx, my, rf, (p % 2) * 8 + mvx - 2, (p / 2) * 8 + mvy - 2,
                       13, 13, p == 0);
          end
        endcase
        mb_cyc[mode] += cyc_now - c0;
        mb_cnt[mode]++;
      end
    end
    // a window far from the macroblock, in reference frame 3
    start_mb(12, 2);
    run_window(12, 2, 3, 100, -40, 21, 21, 1);
    run_window(12, 2, 3, 100, -40, 21, 21, 0);
    // one macroblock of sixteen 4x4 partitions (9x9 windows)
    start_mb(13, 2);
    c0 = cyc_now;
    for (int p = 0; p < 16; p++)
      run_window(13, 2, 0, (p % 4) * 4 - 3 + int'($urandom_range(0, 2)),
                 (p / 4) * 4 - 3 + int'($urandom_range(0, 2)), 9, 9, p == 0);
    mb_cyc[4] += cyc_now - c0;
    mb_cnt[4]++;
    // directed: fill bank 0 so that its oldest line is hit (and locked) by a
    // window that also misses in bank 0; the victim must skip the locked way
    start_mb(0, 3);
    run_window(0, 3, 5, 0, 0, 8, 6, 1);
    for (int k = 1; k <= 5; k++) run_window(0, 3, 5, 0, 16 * (k + 1), 8, 6, 0);
    run_window(0, 3, 5, 0, 0, 8, 18, 0);
    repeat (5) @(posedge clk);
    check(dram_errors == 0, $sformatf("SDRAM timing errors: %0d", dram_errors));
    $display("mechanisms: intra-MB hit windows %0d, inter-MB hit windows %0d, tag resets %0d,",
             intra_hits, inter_hits, resets);
    $display("  evictions %0d, locked-line skips %0d, multi-page windows %0d,",
             model.evictions, model.lock_skips, multi_page);
    $display("  hidden precharge/activate %0d, bursts >= 4 words %0d",
             hidden_prep, long_bursts);
    $display("totals: hits %0d misses %0d ACT %0d RD %0d bursts %0d (avg burst %0.2f words)",
             hit_count, miss_count, act_count, rd_count, burst_count,
             real'(rd_count) / real'(burst_count));
    foreach (mb_cnt[i])
      if (mb_cnt[i] > 0)
        $display("cycles per macroblock, %s partitions: %0d (%0d macroblocks)",
                 i == 0 ? "16x16" : i == 1 ? "16x8" : i == 2 ? "8x16" : i == 3 ? "8x8" : "4x4",
                 mb_cyc[i] / mb_cnt[i], mb_cnt[i]);
    check(intra_hits > 0, "intra-MB reuse never happened");
    check(inter_hits > 0, "inter-MB reuse never happened");
    check(resets >= 2, "tag reset never happened");
    check(model.evictions > 0, "eviction never happened");
    check(model.lock_skips > 0, "locked-line skip never happened");
    check(multi_page > 0, "no window crossed an SDRAM row");
    check(hidden_prep > 0, "no precharge/activate hidden behind reads");
    check(long_bursts > 0, "no long burst");
    check(frac2d > 0, "no two-dimensional sub-pixel position");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
