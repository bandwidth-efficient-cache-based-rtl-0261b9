// tb_sram_ag_ctrl: the SRAM address generator with the four SRAMs. Random
// word fills (bank, way, word) and line reads are compared with a
// reference copy of the cache data: the line read one cycle after its
// request must hold the odd-row word above the even-row word, and a read
// requested together with a fill must be refused (rd_ready = 0).
module tb_sram_ag_ctrl;
  import mc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic              wr_valid = 0, wr_word = 0, rd_valid = 0, rd_ready, rd_valid_q;
  logic [3:0]        wr_bank = 0, rd_bank = 0;
  logic [2:0]        wr_way = 0, rd_way = 0;
  logic [63:0]       wr_data = 0;
  logic [127:0]      rd_line;
  logic [3:0]        s_ce, s_we;
  logic [6:0]        s_addr  [4];
  logic [31:0]       s_wdata [4];
  logic [31:0]       s_rdata [4];

  sram_ag_ctrl dut (.*);
  sram_set u_set (.clk, .ce (s_ce), .we (s_we), .addr (s_addr), .wdata (s_wdata),
                  .rdata (s_rdata));

  int checks = 0, failures = 0;
  logic [63:0] ref_w [16][6][2];

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int b, w, refused = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (b = 0; b < 16; b++) for (w = 0; w < 6; w++) for (int k = 0; k < 2; k++) begin
      wr_valid <= 1; wr_bank <= 4'(b); wr_way <= 3'(w); wr_word <= k[0];
      wr_data <= {$urandom, $urandom}; #0;
      @(posedge clk);
      ref_w[b][w][k] = wr_data;
    end
    wr_valid <= 0;
    for (int n = 0; n < 4000; n++) begin
      b = int'($urandom_range(0, 15)); w = int'($urandom_range(0, 5));
      wr_valid <= ($urandom_range(0, 3) == 0);
      wr_bank <= 4'($urandom_range(0, 15)); wr_way <= 3'($urandom_range(0, 5));
      wr_word <= 1'($urandom); wr_data <= {$urandom, $urandom};
      rd_valid <= 1; rd_bank <= 4'(b); rd_way <= 3'(w);
      #1;
      checks++;
      if (rd_ready == wr_valid) failures++;
      if (!rd_ready) refused++;
      @(posedge clk);
      if (wr_valid) ref_w[wr_bank][wr_way][wr_word] = wr_data;
      #1;
      checks++;
      if (rd_valid_q != !wr_valid) failures++;
      if (rd_valid_q && rd_line !== {ref_w[b][w][1], ref_w[b][w][0]}) begin
        failures++;
        if (failures < 10) $display("FAIL: line bank %0d way %0d", b, w);
      end
    end
    checks++;
    if (refused == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
