// tb_cache_tags: the 16-bank tag store driven the way the fetch controller
// drives it (lock on hit, allocate on miss, release everything after each
// window, shift or reset tags per macroblock), with hits compared against
// the reference cache model for random line positions around the
// macroblock. Lines that differ only in their bank must not hit each other.
module tb_cache_tags;
  import mc_pkg::*;
  import tb_mc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [3:0]        lk_bank = 0, unlock_bank = 0;
  logic [3:0]        lk_refidx = 0;
  logic signed [5:0] lk_xtag = 0, lk_ytag = 0;
  logic              hit, lock_set = 0, alloc = 0, alloc_ready, unlock = 0;
  logic [2:0]        hit_way, alloc_way, unlock_way = 0;
  logic              next_mb = 0, reset_tags = 0;

  cache_tags dut (.*);

  int checks = 0, failures = 0, n_hits = 0, n_miss = 0;
  CacheModel model;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lx, ly, rf, bk, exp_hit;
    int used_b [$], used_w [$];
    model = new();
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int win = 0; win < 400; win++) begin
      if (win % 10 == 0) begin
        if (win % 50 == 0) begin reset_tags <= 1; model.reset_tags(); end
        else begin next_mb <= 1; model.next_mb(); end
        @(posedge clk);
        reset_tags <= 0; next_mb <= 0;
      end
      used_b.delete(); used_w.delete();
      for (int l = 0; l < 6; l++) begin
        lx = int'($urandom_range(0, 7)) - 4;
        ly = int'($urandom_range(0, 15)) - 4 + l * 0;
        rf = int'($urandom_range(0, 1));
        // a line is requested once per window
        bk = (ly & 7) * 2 + (lx & 1);
        lk_bank <= 4'(bk); lk_refidx <= 4'(rf);
        lk_xtag <= 6'(fdiv(lx, 2)); lk_ytag <= 6'(fdiv(ly, 8));
        #1;
        exp_hit = model.access(rf, lx, ly);
        checks++;
        if (hit != exp_hit[0]) begin
          failures++;
          if (failures < 10) $display("FAIL: window %0d line (%0d,%0d) ref %0d hit %0b exp %0d",
                                      win, lx, ly, rf, hit, exp_hit);
        end
        if (hit) begin n_hits++; lock_set <= 1; used_b.push_back(bk); used_w.push_back(int'(hit_way)); end
        else begin
          checks++;
          if (!alloc_ready) failures++;
          n_miss++; alloc <= 1; used_b.push_back(bk); used_w.push_back(int'(alloc_way));
        end
        @(posedge clk);
        lock_set <= 0; alloc <= 0;
        // the same position must now hit, in the same way
        #1;
        checks++;
        if (!hit || int'(hit_way) != used_w[used_w.size()-1]) begin
          failures++;
          if (failures < 10) $display("FAIL: line not present after access");
        end
        // a window never asks twice for one line: release and re-access are
        // kept consistent by unlocking at the window end only
        @(posedge clk);
      end
      foreach (used_b[i]) begin
        unlock <= 1; unlock_bank <= 4'(used_b[i]); unlock_way <= 3'(used_w[i]);
        @(posedge clk);
      end
      unlock <= 0;
      model.unlock_all();
    end
    checks++;
    if (n_hits < 100 || n_miss < 100) failures++;
    $display("hits %0d misses %0d evictions %0d", n_hits, n_miss, model.evictions);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
