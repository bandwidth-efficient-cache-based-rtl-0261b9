// tb_replacement_ctrl: random lock patterns and allocations against a
// reference FIFO pointer that skips locked ways; also all-locked and clear.
module tb_replacement_ctrl;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [5:0] lock_vec = '0;
  logic       alloc = 0, clear = 0;
  logic [2:0] victim_way;
  logic       victim_valid;

  replacement_ctrl dut (.*);

  int checks = 0, failures = 0;
  int ptr = 0, ev, skips = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int i = 0; i < 3000; i++) begin
      lock_vec <= 6'($urandom) & 6'($urandom);
      if (i % 500 == 250) lock_vec <= '1;
      alloc    <= ($urandom_range(0, 2) != 0);
      clear    <= ($urandom_range(0, 60) == 0);
      #1;
      ev = -1;
      for (int k = 0; k < 6; k++)
        if (ev < 0 && !lock_vec[(ptr + k) % 6]) ev = (ptr + k) % 6;
      checks++;
      if (victim_valid != (ev >= 0) || (ev >= 0 && int'(victim_way) != ev)) begin
        failures++;
        $display("FAIL: ptr %0d locks %b victim %0d/%0b expected %0d", ptr, lock_vec,
                 victim_way, victim_valid, ev);
      end
      if (ev >= 0 && ev != ptr) skips++;
      @(posedge clk);
      if (clear) ptr = 0;
      else if (alloc && ev >= 0) ptr = (ev + 1) % 6;
    end
    checks++;
    if (skips == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
