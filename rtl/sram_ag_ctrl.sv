// sram_ag_ctrl: address generation and control of the cache SRAM set.
//
// The line address is bank * WAYS + way. Two requesters share the
// single-port SRAMs:
//   fill  (from the DRAM controller): one 64-bit word per cycle with its
//         cache bank, way and word number (0 = even row, 1 = odd row); it
//         is written into SRAMs 0/1 (word 0) or 2/3 (word 1).
//   read  (from the fetch controller): a whole line; all four SRAMs are
//         read and rd_line is valid (rd_valid_q) one cycle later, with the
//         upper 64 bits the odd row and the lower 64 bits the even row.
// A fill always wins; rd_ready tells the reader when its request is taken.
// Fill and read never collide in the fetch flow (fills finish before a
// block is read out), so the arbitration is only a guard.
module sram_ag_ctrl
  import mc_pkg::*;
#(
  parameter int unsigned NWAYS  = WAYS,
  parameter int unsigned LINES  = NUM_BANKS * WAYS,
  parameter int unsigned ADDR_W = $clog2(LINES)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               wr_valid,
  input  logic [BANK_W-1:0]  wr_bank,
  input  logic [WAY_W-1:0]   wr_way,
  input  logic               wr_word,
  input  logic [WORD_W-1:0]  wr_data,
  input  logic               rd_valid,
  output logic               rd_ready,
  input  logic [BANK_W-1:0]  rd_bank,
  input  logic [WAY_W-1:0]   rd_way,
  output logic               rd_valid_q,
  output logic [LINE_W-1:0]  rd_line,
  // to sram_set
  output logic [3:0]         s_ce,
  output logic [3:0]         s_we,
  output logic [ADDR_W-1:0]  s_addr  [4],
  output logic [31:0]        s_wdata [4],
  input  logic [31:0]        s_rdata [4]
);

  logic [ADDR_W-1:0] wr_addr, rd_addr;

  assign wr_addr  = ADDR_W'(int'(wr_bank) * NWAYS + int'(wr_way));
  assign rd_addr  = ADDR_W'(int'(rd_bank) * NWAYS + int'(rd_way));
  assign rd_ready = !wr_valid;

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      s_addr[i]  = wr_valid ? wr_addr : rd_addr;
      s_wdata[i] = (i % 2 == 0) ? wr_data[31:0] : wr_data[63:32];
    end
    if (wr_valid) begin
      s_ce = wr_word ? 4'b1100 : 4'b0011;
      s_we = s_ce;
    end else begin
      s_ce = rd_valid ? 4'b1111 : 4'b0000;
      s_we = 4'b0000;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rd_valid_q <= 1'b0;
    else        rd_valid_q <= rd_valid && rd_ready;
  end

  assign rd_line = {s_rdata[3], s_rdata[2], s_rdata[1], s_rdata[0]};

endmodule
