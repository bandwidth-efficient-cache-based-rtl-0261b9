// dram_ctrl: SDRAM controller for cache-line fills, with access pattern
// reordering and command out-of-order issue.
//
// Operation: the fetch controller pushes the line fills of one reference
// block (req_valid/req_ready, up to MAX_REQ lines, each two 64-bit words in
// one SDRAM row) and pulses start. The controller then reads them all and
// writes each returned word into the cache SRAMs (fill port); busy falls
// when the last word is written and the buffer is emptied.
//
// Access pattern reordering: the controller stays on one SDRAM page
// (bank + row) until every buffered line of that page is read, then moves
// to the page of the oldest line still waiting. A region that straddles
// a row boundary therefore opens each row once instead of switching back
// and forth as a raster-order walk would.
//
// Command out-of-order: while the current page is read, the controller
// already precharges and activates the bank of the next page (the page of
// the oldest waiting line outside the current page) if that is a different
// bank. Precharge/activate take a command slot between reads, so their
// latency is hidden behind the reads of the current page.
//
// Command bus: one command per cycle (NOP, ACT, PRE, RD with burst length
// one). Timing honoured: TRP cycles from PRE to ACT, TRCD from ACT to RD;
// read data is sampled CL cycles after the RD cycle. Rows stay open after
// use. The document gives a 60 ns = 10 cycle precharge/activate latency at
// 166 MHz; splitting it 5 + 5 and CL = 3 are this design's choices.
// Statistics: counts of ACT and RD commands and of bursts (runs of RDs to
// consecutive columns of one row).
module dram_ctrl
  import mc_pkg::*;
#(
  parameter int unsigned MAX_REQ = 48,
  parameter int unsigned TRP     = 5,
  parameter int unsigned TRCD    = 5,
  parameter int unsigned CL      = 3,
  parameter int unsigned IDX_W   = $clog2(MAX_REQ + 1)
) (
  input  logic               clk,
  input  logic               rst_n,
  // line fill requests
  input  logic               req_valid,
  output logic               req_ready,
  input  line_req_t          req,
  input  logic               start,
  output logic               busy,
  // SDRAM
  output dram_cmd_e          cmd,
  output logic [DBANK_W-1:0] cmd_bank,
  output logic [DROW_W-1:0]  cmd_row,
  output logic [DCOL_W-1:0]  cmd_col,
  input  logic [WORD_W-1:0]  dq,
  // fill port to the SRAM controller
  output logic               wr_valid,
  output logic [BANK_W-1:0]  wr_bank,
  output logic [WAY_W-1:0]   wr_way,
  output logic               wr_word,
  output logic [WORD_W-1:0]  wr_data,
  // statistics
  output logic [31:0]        act_count,
  output logic [31:0]        rd_count,
  output logic [31:0]        burst_count
);

  localparam int unsigned NDB = 1 << DBANK_W;
  localparam int unsigned TW  = $clog2(((TRP > TRCD) ? TRP : TRCD) + 1);

  typedef struct packed {
    logic [DBANK_W-1:0] bank;
    logic [DROW_W-1:0]  row;
  } page_t;

  typedef struct packed {
    logic              valid;
    logic [BANK_W-1:0] cbank;
    logic [WAY_W-1:0]  cway;
    logic              word;
  } ret_t;

  line_req_t          buf_q   [MAX_REQ];
  logic [MAX_REQ-1:0] pending;
  logic [IDX_W-1:0]   count;
  logic               serving;
  logic               word_idx;
  page_t              cur_page_q;
  logic               cur_page_vld;

  logic [NDB-1:0]     b_active;
  logic [DROW_W-1:0]  b_row   [NDB];
  logic [TW-1:0]      b_timer [NDB];

  ret_t               ret_pipe [CL];

  // last RD, for burst counting
  logic               last_rd_vld;
  page_t              last_rd_page;
  logic [DCOL_W-1:0]  last_rd_col;

  // ---------------------------------------------------------------- select
  page_t              first_page, eff_page, next_page;
  logic               any_pending, cur_match, next_vld;
  logic [IDX_W-1:0]   cur_idx;

  function automatic page_t page_of(line_req_t r);
    return '{bank: r.bank, row: r.row};
  endfunction

  always_comb begin
    any_pending = 1'b0;
    cur_match   = 1'b0;
    first_page  = '0;
    for (int unsigned i = 0; i < MAX_REQ; i++) begin
      if (pending[i] && !any_pending) begin
        any_pending = 1'b1;
        first_page  = page_of(buf_q[i]);
      end
      if (pending[i] && cur_page_vld && page_of(buf_q[i]) == cur_page_q)
        cur_match = 1'b1;
    end
    eff_page = cur_match ? cur_page_q : first_page;

    cur_idx   = '0;
    next_vld  = 1'b0;
    next_page = '0;
    for (int i = MAX_REQ - 1; i >= 0; i--) begin
      if (pending[i] && page_of(buf_q[i]) == eff_page)
        cur_idx = IDX_W'(i);
      if (pending[i] && page_of(buf_q[i]) != eff_page) begin
        next_vld  = 1'b1;
        next_page = page_of(buf_q[i]);
      end
    end
  end

  // --------------------------------------------------------------- command
  typedef enum logic [1:0] {NEED_NONE, NEED_PRE, NEED_ACT, NEED_RD} need_e;

  function automatic need_e page_need(page_t p, logic [NDB-1:0] act,
                                      logic [DROW_W-1:0] row_of_bank);
    if (act[p.bank] && row_of_bank == p.row) return NEED_RD;
    if (act[p.bank])                         return NEED_PRE;
    return NEED_ACT;
  endfunction

  need_e      cur_need, nxt_need;
  logic       cur_tready, nxt_tready;
  line_req_t  cur_req;

  always_comb begin
    cur_req    = buf_q[cur_idx[$clog2(MAX_REQ)-1:0]];
    cur_need   = page_need(eff_page, b_active, b_row[eff_page.bank]);
    nxt_need   = page_need(next_page, b_active, b_row[next_page.bank]);
    cur_tready = (b_timer[eff_page.bank] == '0);
    nxt_tready = (b_timer[next_page.bank] == '0);

    cmd      = DCMD_NOP;
    cmd_bank = eff_page.bank;
    cmd_row  = eff_page.row;
    cmd_col  = word_idx ? cur_req.col1 : cur_req.col0;
    if (serving && any_pending) begin
      if (cur_need == NEED_PRE) begin
        cmd = DCMD_PRE;
      end else if (cur_need == NEED_ACT && cur_tready) begin
        cmd = DCMD_ACT;
      end else if (next_vld && next_page.bank != eff_page.bank &&
                   nxt_need != NEED_RD &&
                   (nxt_need == NEED_PRE || nxt_tready)) begin
        cmd      = (nxt_need == NEED_PRE) ? DCMD_PRE : DCMD_ACT;
        cmd_bank = next_page.bank;
        cmd_row  = next_page.row;
      end else if (cur_need == NEED_RD && cur_tready) begin
        cmd = DCMD_RD;
      end
    end
  end

  // ------------------------------------------------------------ sequencing
  logic ret_empty;
  always_comb begin
    ret_empty = 1'b1;
    for (int unsigned s = 0; s < CL; s++)
      if (ret_pipe[s].valid) ret_empty = 1'b0;
  end

  assign busy      = serving;
  assign req_ready = !serving && (count < IDX_W'(MAX_REQ));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pending      <= '0;
      count        <= '0;
      serving      <= 1'b0;
      word_idx     <= 1'b0;
      cur_page_q   <= '0;
      cur_page_vld <= 1'b0;
      b_active     <= '0;
      for (int unsigned b = 0; b < NDB; b++) begin
        b_row[b]   <= '0;
        b_timer[b] <= '0;
      end
      for (int unsigned s = 0; s < CL; s++) ret_pipe[s] <= '0;
      act_count    <= '0;
      rd_count     <= '0;
      burst_count  <= '0;
      last_rd_vld  <= 1'b0;
      last_rd_page <= '0;
      last_rd_col  <= '0;
    end else begin
      for (int unsigned b = 0; b < NDB; b++)
        if (b_timer[b] != '0) b_timer[b] <= b_timer[b] - 1'b1;

      if (req_valid && req_ready) begin
        buf_q[count[$clog2(MAX_REQ)-1:0]]   <= req;
        pending[count[$clog2(MAX_REQ)-1:0]] <= 1'b1;
        count <= count + 1'b1;
      end

      if (start && !serving) serving <= 1'b1;

      cur_page_q   <= eff_page;
      cur_page_vld <= any_pending;

      ret_pipe[0] <= '0;
      for (int unsigned s = 1; s < CL; s++) ret_pipe[s] <= ret_pipe[s-1];

      unique case (cmd)
        DCMD_PRE: begin
          b_active[cmd_bank] <= 1'b0;
          b_timer[cmd_bank]  <= TW'(TRP - 1);
        end
        DCMD_ACT: begin
          b_active[cmd_bank] <= 1'b1;
          b_row[cmd_bank]    <= cmd_row;
          b_timer[cmd_bank]  <= TW'(TRCD - 1);
          act_count          <= act_count + 1;
        end
        DCMD_RD: begin
          ret_pipe[0] <= '{valid: 1'b1, cbank: cur_req.cbank, cway: cur_req.cway,
                           word: word_idx};
          word_idx    <= !word_idx;
          if (word_idx) pending[cur_idx[$clog2(MAX_REQ)-1:0]] <= 1'b0;
          rd_count    <= rd_count + 1;
          if (!(last_rd_vld && last_rd_page == eff_page &&
                cmd_col == last_rd_col + 1'b1))
            burst_count <= burst_count + 1;
          last_rd_vld  <= 1'b1;
          last_rd_page <= eff_page;
          last_rd_col  <= cmd_col;
        end
        default: ;
      endcase

      if (serving && !any_pending && ret_empty) begin
        serving <= 1'b0;
        count   <= '0;
      end
    end
  end

  assign wr_valid = ret_pipe[CL-1].valid;
  assign wr_bank  = ret_pipe[CL-1].cbank;
  assign wr_way   = ret_pipe[CL-1].cway;
  assign wr_word  = ret_pipe[CL-1].word;
  assign wr_data  = dq;

endmodule
