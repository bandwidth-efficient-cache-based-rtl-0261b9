// sdram_model: behavioural model of the 4-bank SDRAM frame memory on a
// 64-bit bus, for simulation only.
//
// Commands (NOP/ACT/PRE/RD) are sampled on the rising clock edge. RD data
// is driven on dq during the CL-th cycle after the RD cycle. The content of
// a word is tb_mc_pkg::dram_word(bank, row, col), so no storage is needed.
// The model checks the timing it is given: ACT only to a precharged bank
// at least TRP cycles after its PRE, RD only to an active bank at least
// TRCD cycles after its ACT; each breach increments errors.
module sdram_model
  import mc_pkg::*;
#(
  parameter int TRP  = 5,
  parameter int TRCD = 5,
  parameter int CL   = 3
) (
  input  logic               clk,
  input  logic               rst_n,
  input  dram_cmd_e          cmd,
  input  logic [DBANK_W-1:0] bank,
  input  logic [DROW_W-1:0]  row,
  input  logic [DCOL_W-1:0]  col,
  output logic [WORD_W-1:0]  dq,
  output int                 errors
);

  bit           active [4];
  int           arow   [4];
  longint       t_pre  [4];
  longint       t_act  [4];
  longint       now;
  logic [63:0]  pipe   [CL];

  assign dq = pipe[CL-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      now    <= 0;
      errors <= 0;
      for (int b = 0; b < 4; b++) begin
        active[b] <= 0; arow[b] <= 0; t_pre[b] <= -100; t_act[b] <= -100;
      end
      for (int s = 0; s < CL; s++) pipe[s] <= '0;
    end else begin
      now <= now + 1;
      pipe[0] <= '0;
      for (int s = 1; s < CL; s++) pipe[s] <= pipe[s-1];
      case (cmd)
        DCMD_PRE: begin
          active[bank] <= 0;
          t_pre[bank]  <= now;
        end
        DCMD_ACT: begin
          if (active[bank] || now - t_pre[bank] < longint'(TRP)) begin
            errors <= errors + 1;
            $display("sdram_model: bad ACT bank %0d at %0d", bank, now);
          end
          active[bank] <= 1;
          arow[bank]   <= int'(row);
          t_act[bank]  <= now;
        end
        DCMD_RD: begin
          if (!active[bank] || arow[bank] != int'(row) || now - t_act[bank] < longint'(TRCD)) begin
            errors <= errors + 1;
            $display("sdram_model: bad RD bank %0d row %0d at %0d", bank, row, now);
          end
          pipe[0] <= tb_mc_pkg::dram_word(int'(bank), int'(arow[bank]), int'(col));
        end
        default: ;
      endcase
    end
  end

endmodule
