// tb_sram_set: random writes to the four SRAMs (each with its own address)
// and reads checked against a reference array, including the one-cycle
// read latency and that a write to one SRAM leaves the others unchanged.
module tb_sram_set;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [3:0]  ce = 0, we = 0;
  logic [6:0]  addr  [4];
  logic [31:0] wdata [4];
  logic [31:0] rdata [4];

  sram_set dut (.*);

  int checks = 0, failures = 0;
  logic [31:0] ref_mem [4][96];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a [4];
    for (int i = 0; i < 4; i++) begin addr[i] = 0; wdata[i] = 0; end
    @(posedge clk);
    // fill everything
    for (int l = 0; l < 96; l++) begin
      ce <= '1; we <= '1;
      for (int i = 0; i < 4; i++) begin
        addr[i] <= 7'(l); wdata[i] <= $urandom; #0;
      end
      @(posedge clk);
      for (int i = 0; i < 4; i++) ref_mem[i][l] = wdata[i];
    end
    for (int n = 0; n < 3000; n++) begin
      for (int i = 0; i < 4; i++) begin
        a[i] = int'($urandom_range(0, 95));
        addr[i] <= 7'(a[i]);
        wdata[i] <= $urandom;
      end
      ce <= 4'($urandom); we <= 4'($urandom);
      @(posedge clk);
      #1;
      for (int i = 0; i < 4; i++) if (ce[i]) begin
        if (we[i]) ref_mem[i][a[i]] = wdata[i];
        else begin
          checks++;
          if (rdata[i] !== ref_mem[i][a[i]]) begin
            failures++;
            if (failures < 10) $display("FAIL: sram %0d addr %0d", i, a[i]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
