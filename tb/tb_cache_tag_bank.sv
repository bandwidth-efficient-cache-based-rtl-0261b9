// tb_cache_tag_bank: random lookups, allocations, lock/unlock and tag
// updates (next macroblock, row start) of one 6-way tag bank, compared with
// a reference model of the tags, the Lock bits and the FIFO pointer.
module tb_cache_tag_bank;
  import mc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [3:0]        lk_refidx = 0;
  logic signed [5:0] lk_xtag = 0, lk_ytag = 0;
  logic              hit, lock_set = 0, alloc = 0, alloc_ready, unlock = 0;
  logic [2:0]        hit_way, lock_way = 0, alloc_way, unlock_way = 0;
  logic              next_mb = 0, reset_tags = 0;

  cache_tag_bank dut (.*);

  int checks = 0, failures = 0;
  bit m_valid [6];
  bit m_lock  [6];
  int m_ref [6], m_x [6], m_y [6];
  int m_ptr = 0;
  int n_hits = 0, n_wraps = 0;

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int hw, ev, op, w;
    for (int i = 0; i < 6; i++) begin m_valid[i] = 0; m_lock[i] = 0; end
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int i = 0; i < 6000; i++) begin
      lk_refidx <= 4'($urandom_range(0, 1));
      lk_xtag   <= 6'($urandom_range(0, 3)) - 6'sd32 * 6'(i % 7 == 0);
      lk_ytag   <= 6'($urandom_range(0, 1));
      op = int'($urandom_range(0, 99));
      #1;
      hw = -1;
      for (int k = 0; k < 6; k++)
        if (hw < 0 && m_valid[k] && m_ref[k] == int'(lk_refidx) &&
            m_x[k] == int'(lk_xtag) && m_y[k] == int'(lk_ytag)) hw = k;
      ev = -1;
      for (int k = 0; k < 6; k++)
        if (ev < 0 && !m_lock[(m_ptr + k) % 6]) ev = (m_ptr + k) % 6;
      chk(hit == (hw >= 0) && (hw < 0 || int'(hit_way) == hw), "hit/way");
      chk(alloc_ready == (ev >= 0) && (ev < 0 || int'(alloc_way) == ev), "victim");
      if (hw >= 0) n_hits++;
      lock_set <= 0; alloc <= 0; unlock <= 0; next_mb <= 0; reset_tags <= 0;
      if (op < 2) begin
        reset_tags <= 1;
        for (int k = 0; k < 6; k++) begin m_valid[k] = 0; m_lock[k] = 0; end
        m_ptr = 0;
      end else if (op < 6) begin
        next_mb <= 1;
        for (int k = 0; k < 6; k++) begin
          if (m_x[k] == -32) begin
            if (m_valid[k]) n_wraps++;
            m_valid[k] = 0; m_x[k] = 31;
          end else m_x[k] = m_x[k] - 1;
        end
      end else begin
        if (hw >= 0 && op < 50) begin
          lock_set <= 1; lock_way <= 3'(hw); m_lock[hw] = 1;
        end else if (hw < 0 && ev >= 0 && op < 60) begin
          alloc <= 1;
          m_valid[ev] = 1; m_lock[ev] = 1; m_ref[ev] = int'(lk_refidx);
          m_x[ev] = int'(lk_xtag); m_y[ev] = int'(lk_ytag);
          m_ptr = (ev + 1) % 6;
        end
        if (op >= 70) begin
          w = int'($urandom_range(0, 5));
          if (!((hw >= 0 && op < 50 && hw == w) || (hw < 0 && op < 60 && ev == w))) begin
            unlock <= 1; unlock_way <= 3'(w);
            m_lock[w] = 0;
          end
        end
      end
      @(posedge clk);
    end
    chk(n_hits > 100, "too few hits");
    chk(n_wraps > 0, "tag wrap never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
