// tb_dram_ctrl: the SDRAM controller with the SDRAM model. Each test
// queues the line fills of a reference window (lines in column order, two
// words each, addressed with the reference mapping), starts the controller
// and checks:
//   * every word comes back once, into the right cache slot, with the
//     content of its SDRAM column, and no SDRAM timing rule is broken;
//   * reordering: at most one ACT per distinct page of the window, and the
//     reads visit each page in one run even where the queued lines
//     alternate between pages;
//   * out-of-order: for a window across four quadrants (four banks), the
//     precharge/activate of the later pages is issued between reads, so the
//     window costs at most one exposed TRP+TRCD;
//   * rate: a window in an already open page takes 2 cycles per line plus
//     the CAS latency and a fixed overhead of at most 3 cycles.
module tb_dram_ctrl;
  import mc_pkg::*;
  import tb_mc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic               req_valid = 0, req_ready, start = 0, busy;
  line_req_t          req;
  dram_cmd_e          cmd;
  logic [1:0]         cmd_bank;
  logic [11:0]        cmd_row;
  logic [7:0]         cmd_col;
  logic [63:0]        dq;
  logic               wr_valid, wr_word;
  logic [3:0]         wr_bank;
  logic [2:0]         wr_way;
  logic [63:0]        wr_data;
  logic [31:0]        act_count, rd_count, burst_count;
  int                 dram_errors;

  dram_ctrl dut (.*);
  sdram_model u_mem (.clk, .rst_n, .cmd, .bank (cmd_bank), .row (cmd_row), .col (cmd_col),
                     .dq, .errors (dram_errors));

  int checks = 0, failures = 0, reordered = 0;
  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected words per slot (slot = request index, encoded in cbank/cway)
  logic [63:0] exp_w [48][2];
  int          seen  [48][2];
  always @(posedge clk) if (wr_valid) begin
    int s;
    s = int'(wr_bank) * 6 + int'(wr_way);
    if (s < 48) begin
      seen[s][wr_word]++;
      chk(wr_data == exp_w[s][wr_word], $sformatf("slot %0d word %0d data", s, wr_word));
    end else chk(0, "slot out of range");
  end

  int prep_between = 0, last_rd_bank = -1;
  int visit_pages [$];
  int last_rd_page = -1;
  always @(posedge clk) if (cmd == DCMD_RD) begin
    int pg;
    pg = int'(cmd_bank) * 65536 + int'(cmd_row);
    if (pg != last_rd_page) visit_pages.push_back(pg);
    last_rd_page = pg;
  end
  bit prep_seen = 0;
  always @(posedge clk) if (busy) begin
    if ((cmd == DCMD_PRE || cmd == DCMD_ACT) && last_rd_bank >= 0 &&
        int'(cmd_bank) != last_rd_bank) prep_seen = 1;
    if (cmd == DCMD_RD) begin
      if (prep_seen && int'(cmd_bank) == last_rd_bank) prep_between++;
      prep_seen = 0;
      last_rd_bank = int'(cmd_bank);
    end
  end

  // returns the number of busy cycles
  task automatic run_window(int rf, int x0, int y0, int w, int h, output int cycles,
                            output int pages_n, output int acts);
    int n, a0, req_changes, last_pg;
    int pages [$];
    ref_addr_t m0, m1;
    n = 0;
    req_changes = 0;
    last_pg = -1;
    visit_pages.delete();
    last_rd_page = -1;
    a0 = int'(act_count);
    for (int lx = fdiv(x0, 8); lx <= fdiv(x0 + w - 1, 8); lx++)
      for (int ly = fdiv(y0, 2); ly <= fdiv(y0 + h - 1, 2); ly++) begin
        bit found;
        m0 = ref_map(rf, lx * 8, ly * 2);
        m1 = ref_map(rf, lx * 8, ly * 2 + 1);
        while (!req_ready) @(posedge clk);
        req_valid <= 1;
        req <= '{bank: 2'(m0.bank), row: 12'(m0.row), col0: 8'(m0.col), col1: 8'(m1.col),
                 cbank: 4'(n / 6), cway: 3'(n % 6)};
        exp_w[n][0] = dram_word(m0.bank, m0.row, m0.col);
        exp_w[n][1] = dram_word(m1.bank, m1.row, m1.col);
        seen[n][0] = 0; seen[n][1] = 0;
        found = 0;
        foreach (pages[i]) if (pages[i] == m0.bank * 65536 + m0.row) found = 1;
        if (!found) pages.push_back(m0.bank * 65536 + m0.row);
        if (m0.bank * 65536 + m0.row != last_pg) req_changes++;
        last_pg = m0.bank * 65536 + m0.row;
        n++;
        @(posedge clk);
      end
    req_valid <= 0;
    start <= 1;
    @(posedge clk);
    start <= 0;
    cycles = 0;
    #1;
    while (busy) begin @(posedge clk); #1; cycles++; end
    for (int i = 0; i < n; i++)
      chk(seen[i][0] == 1 && seen[i][1] == 1, $sformatf("slot %0d written %0d/%0d times",
          i, seen[i][0], seen[i][1]));
    pages_n = pages.size();
    // reordering: each page is read in one run, however the lines alternate
    chk(visit_pages.size() == pages_n, $sformatf("reads visited %0d page runs for %0d pages",
        visit_pages.size(), pages_n));
    if (req_changes > pages_n) reordered++;
    acts = int'(act_count) - a0;
    chk(acts <= pages_n, $sformatf("%0d ACTs for %0d pages", acts, pages_n));
    @(posedge clk);
  endtask

  initial begin
    int cyc, np, na, p0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // one page, cold: one ACT
    run_window(0, 8, 8, 13, 13, cyc, np, na);
    chk(np == 1 && na == 1, "single page window: one ACT");
    // same page again, now open: 2 cycles per line (2 x 7 lines) + CL + <=3
    run_window(0, 8, 8, 13, 13, cyc, np, na);
    chk(na == 0, "open page: no ACT");
    chk(cyc >= 2 * 14 + 3 && cyc <= 2 * 14 + 3 + 3, $sformatf("open page took %0d cycles", cyc));
    // across the four quadrants of a tile (four banks): case D
    p0 = prep_between;
    run_window(0, 54, 22, 21, 21, cyc, np, na);
    chk(np == 4, "four pages");
    chk(prep_between > p0, "precharge/activate hidden between reads");
    // 44 lines = 88 reads; one exposed TRP+TRCD at most (10) + CL + overhead
    chk(cyc <= 88 + 10 + 3 + 8, $sformatf("four-page window took %0d cycles", cyc));
    // across a tile border (same banks, other rows): case B and C
    run_window(0, 120, 60, 21, 21, cyc, np, na);
    run_window(1, 250, 100, 21, 21, cyc, np, na);
    for (int k = 0; k < 30; k++)
      run_window(int'($urandom_range(0, 3)), int'($urandom_range(0, 1900)),
                 int'($urandom_range(0, 1060)), int'($urandom_range(1, 21)),
                 int'($urandom_range(1, 21)), cyc, np, na);
    repeat (5) @(posedge clk);
    chk(dram_errors == 0, "SDRAM timing errors");
    chk(reordered > 0, "no window needed reordering");
    $display("windows reordered %0d", reordered);
    $display("ACT %0d RD %0d bursts %0d", act_count, rd_count, burst_count);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
