// tb_dram_addr_map: the address mapping against an independent reference
// for random positions (inside and outside the frame, all reference
// indices), plus hand-worked cases: vertical word order inside a quadrant,
// the 2x2 bank pattern, tile rows and border clamping.
module tb_dram_addr_map;
  import mc_pkg::*;
  import tb_mc_pkg::*;
  logic [3:0]         refidx;
  logic signed [12:0] x, y;
  dram_addr_t         addr;

  dram_addr_map dut (.*);

  int checks = 0, failures = 0;

  task automatic expect_addr(int r, int px, int py, int b, int rw, int c);
    refidx = 4'(r); x = 13'(px); y = 13'(py);
    #1;
    checks++;
    if (int'(addr.bank) != b || int'(addr.row) != rw || int'(addr.col) != c) begin
      failures++;
      $display("FAIL: ref %0d (%0d,%0d) -> b%0d r%0d c%0d expected b%0d r%0d c%0d",
               r, px, py, addr.bank, addr.row, addr.col, b, rw, c);
    end
  endtask

  // watchdog
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_addr_t a;
    int px, py, r;
    // hand-worked: 15 tiles across, 17 down, 255 rows per frame
    expect_addr(0, 0, 0, 0, 0, 0);
    expect_addr(0, 0, 1, 0, 0, 1);        // next row: next column address
    expect_addr(0, 7, 31, 0, 0, 31);
    expect_addr(0, 8, 0, 0, 0, 32);       // next word column
    expect_addr(0, 63, 31, 0, 0, 255);
    expect_addr(0, 64, 0, 1, 0, 0);       // right quadrant: bank 1
    expect_addr(0, 0, 32, 2, 0, 0);       // lower quadrant: bank 2
    expect_addr(0, 64, 32, 3, 0, 0);
    expect_addr(0, 128, 0, 0, 1, 0);      // next tile
    expect_addr(0, 0, 64, 0, 15, 0);      // next tile row
    expect_addr(2, 0, 0, 0, 510, 0);      // frame 2
    expect_addr(0, -5, -9, 0, 0, 0);      // clamped
    expect_addr(0, 2000, 1100, 3, 254, 255 - 0 * 32 - 0 + 0 - (31 - (1079 % 32)));
    for (int n = 0; n < 5000; n++) begin
      px = int'($urandom_range(0, 2600)) - 300;
      py = int'($urandom_range(0, 1500)) - 200;
      r  = int'($urandom_range(0, 15));
      a  = ref_map(r, px, py);
      expect_addr(r, px, py, a.bank, a.row, a.col);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
