// tb_data_fetch_ctrl: the fetch and cache controller with the real tag
// store and SRAMs; the DRAM controller is replaced by a simple responder
// that accepts fills (with random back-pressure, which stalls the lookup),
// and on start writes each word (content = hash of its SDRAM address).
// Checked per window against the reference cache model: which lines miss,
// the SDRAM address and cache bank of each fill request, the hit/miss
// counts, and position, order and content of every line sent to the
// interpolator. Windows overlap inside a macroblock and across macroblocks.
module tb_data_fetch_ctrl;
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
  logic [BANK_W-1:0]        lk_bank, unlock_bank, rd_bank;
  logic [REFIDX_W-1:0]      lk_refidx;
  logic signed [TAG_W-1:0]  lk_xtag, lk_ytag;
  logic                     hit, lock_set, alloc, alloc_ready, unlock, next_mb, reset_tags;
  logic [WAY_W-1:0]         hit_way, alloc_way, unlock_way, rd_way;
  logic                     dreq_valid, dreq_ready, dstart, dbusy;
  line_req_t                dreq;
  logic                     rd_valid, rd_ready, rd_valid_q;
  logic [LINE_W-1:0]        rd_line;
  logic                     out_valid, out_last;
  logic [LINE_W-1:0]        out_line;
  logic signed [POS_W-1:0]  out_x, out_y;
  logic [31:0]              hit_count, miss_count;
  logic                     wr_valid = 0, wr_word = 0;
  logic [BANK_W-1:0]        wr_bank = 0;
  logic [WAY_W-1:0]         wr_way = 0;
  logic [WORD_W-1:0]        wr_data = 0;
  logic [3:0]               s_ce, s_we;
  logic [6:0]               s_addr [4];
  logic [31:0]              s_wdata [4], s_rdata [4];

  data_fetch_ctrl dut (.*);
  cache_tags u_tags (.*);
  sram_ag_ctrl u_sag (.*);
  sram_set u_set (.clk, .ce (s_ce), .we (s_we), .addr (s_addr), .wdata (s_wdata),
                  .rdata (s_rdata));

  int checks = 0, failures = 0;
  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- fill responder
  line_req_t fills [$];
  int stalls = 0, nr = 0;
  logic dbusy_r = 0;
  assign dbusy = dbusy_r;
  always @(posedge clk) begin
    dreq_ready <= ($urandom_range(0, 3) != 0);
    if (dreq_valid && !dreq_ready) stalls++;
    if (!dreq_ready) nr++;
    if (dreq_valid && dreq_ready) fills.push_back(dreq);
  end
  initial begin
    dreq_ready = 1;
    forever begin
      @(posedge clk);
      if (dstart) begin
        dbusy_r <= 1;
        repeat (4) @(posedge clk);
        while (fills.size() > 0) begin
          line_req_t f;
          f = fills.pop_front();
          for (int k = 0; k < 2; k++) begin
            wr_valid <= 1; wr_bank <= f.cbank; wr_way <= f.cway; wr_word <= k[0];
            wr_data <= dram_word(int'(f.bank), int'(f.row), k ? int'(f.col1) : int'(f.col0));
            @(posedge clk);
          end
        end
        wr_valid <= 0;
        dbusy_r <= 0;
      end
    end
  end

  CacheModel model;
  int inter = 0;

  task automatic start_mb(int mx, int my);
    while (!mb_ready) @(posedge clk);
    mb_valid <= 1; mb_x <= MB_W'(mx); mb_y <= MB_W'(my);
    @(posedge clk);
    mb_valid <= 0;
    if (mx == 0) model.reset_tags(); else model.next_mb();
  endtask

  task automatic run_window(int mx, int my, int rf, int x0, int y0, int w, int h);
    int px [$], py [$], missx [$], missy [$];
    int nl, got, h0, m0, eh, em, cyc;
    ref_addr_t a0, a1;
    h0 = int'(hit_count); m0 = int'(miss_count); eh = 0; em = 0;
    for (int lx = fdiv(x0, 8); lx <= fdiv(x0 + w - 1, 8); lx++)
      for (int ly = fdiv(y0, 2); ly <= fdiv(y0 + h - 1, 2); ly++) begin
        px.push_back(lx * 8); py.push_back(ly * 2);
        if (model.access(rf, lx, ly)) eh++;
        else begin em++; missx.push_back(lx * 8); missy.push_back(ly * 2); end
      end
    model.unlock_all();
    nl = px.size();
    while (!blk_ready) @(posedge clk);
    blk_valid <= 1; blk_refidx <= 4'(rf); blk_x0 <= 10'(x0); blk_y0 <= 10'(y0);
    blk_w <= 5'(w); blk_h <= 5'(h);
    @(posedge clk);
    blk_valid <= 0;
    // the fill requests, in lookup order
    while (fills.size() < em && cyc < 3000) begin @(posedge clk); cyc++; end
    for (int i = 0; i < em && i < fills.size(); i++) begin
      a0 = ref_map(rf, mx * 16 + missx[i], my * 16 + missy[i]);
      a1 = ref_map(rf, mx * 16 + missx[i], my * 16 + missy[i] + 1);
      chk(int'(fills[i].bank) == a0.bank && int'(fills[i].row) == a0.row &&
          int'(fills[i].col0) == a0.col && int'(fills[i].col1) == a1.col,
          $sformatf("fill %0d address", i));
      chk(int'(fills[i].cbank) == ((missy[i] / 2) & 7) * 2 + ((missx[i] / 8) & 1),
          $sformatf("fill %0d cache bank", i));
    end
    got = 0; cyc = 0;
    while (got < nl && cyc < 5000) begin
      @(posedge clk);
      cyc++;
      if (out_valid) begin
        chk(int'(out_x) == px[got] && int'(out_y) == py[got], "line position");
        chk(out_line == {pix_word(rf, mx * 16 + px[got], my * 16 + py[got] + 1),
                         pix_word(rf, mx * 16 + px[got], my * 16 + py[got])}, "line data");
        chk(out_last == (got == nl - 1), "out_last");
        got++;
      end
    end
    chk(got == nl, "line count");
    @(posedge clk);
    chk(int'(hit_count) - h0 == eh && int'(miss_count) - m0 == em,
        $sformatf("hits %0d/%0d misses %0d/%0d", int'(hit_count) - h0, eh,
                  int'(miss_count) - m0, em));
  endtask

  initial begin
    int mvx, mvy;
    model = new();
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int my = 3; my <= 4; my++)
      for (int mx = 0; mx < 8; mx++) begin
        start_mb(mx, my);
        for (int p = 0; p < 4; p++) begin
          mvx = int'($urandom_range(0, 6)) - 3;
          mvy = int'($urandom_range(0, 6)) - 3;
          run_window(mx, my, int'($urandom_range(0, 1)), (p % 2) * 8 + mvx - 2,
                     (p / 2) * 8 + mvy - 2, 13, 13);
        end
      end
    chk(stalls > 0, "no fill back-pressure stall");
    $display("hits %0d misses %0d stalls %0d notready %0d", hit_count, miss_count, stalls, nr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
