// replacement_ctrl: FIFO replacement for one cache bank that never evicts a
// locked line.
//
// Lines of a bank are filled in circular order, so the line at the FIFO
// pointer is the oldest. The victim is the oldest line whose Lock bit is 0:
// starting at the pointer, the first unlocked way in circular order. When a
// line is allocated the pointer moves to the way after the victim. The
// document specifies FIFO replacement that skips locked lines; skipping
// past a locked oldest line (instead of waiting for it) is this design's
// choice, and it keeps a block from waiting on its own locked lines.
//
// Interface: lock_vec (one bit per way), alloc (a line is written into
// victim_way this cycle), clear (back to way 0). victim_way/victim_valid are
// combinational; victim_valid is 0 when every way is locked.
module replacement_ctrl #(
  parameter int unsigned WAYS  = 6,
  parameter int unsigned WAY_W = (WAYS > 1) ? $clog2(WAYS) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WAYS-1:0]  lock_vec,
  input  logic             alloc,
  input  logic             clear,
  output logic [WAY_W-1:0] victim_way,
  output logic             victim_valid
);

  logic [WAY_W-1:0] ptr;

  always_comb begin
    int unsigned w;
    victim_way   = '0;
    victim_valid = 1'b0;
    for (int unsigned k = 0; k < WAYS; k++) begin
      w = (int'(ptr) + k) % WAYS;
      if (!victim_valid && !lock_vec[w]) begin
        victim_valid = 1'b1;
        victim_way   = WAY_W'(w);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr <= '0;
    end else if (clear) begin
      ptr <= '0;
    end else if (alloc && victim_valid) begin
      ptr <= (int'(victim_way) == WAYS - 1) ? '0 : victim_way + 1'b1;
    end
  end

endmodule
