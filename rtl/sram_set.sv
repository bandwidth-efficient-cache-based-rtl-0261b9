// sram_set: data store of the cache, four single-port SRAMs.
//
// The 16 banks x 6 lines x 16 pixels = 1536 bytes (1.5 kB) of cache data
// are spread over four SRAMs of LINES words x 32 bits. A cache line occupies
// the same address in all four: SRAM 0 holds pixels 0-3 and SRAM 1 pixels
// 4-7 of the upper word (even row), SRAM 2 and SRAM 3 the same of the lower
// word (odd row). That split, and the line address, are this design's
// choices; the document gives four SRAMs per line and 1.5 kB in total.
// Each SRAM has its own enable, write enable, address and write data so a
// 64-bit word can be written into two of them while the others idle; a read
// of all four returns a whole 128-bit line one cycle later.
module sram_set #(
  parameter int unsigned LINES  = 96,
  parameter int unsigned ADDR_W = $clog2(LINES)
) (
  input  logic              clk,
  input  logic [3:0]        ce,
  input  logic [3:0]        we,
  input  logic [ADDR_W-1:0] addr  [4],
  input  logic [31:0]       wdata [4],
  output logic [31:0]       rdata [4]
);

  for (genvar i = 0; i < 4; i++) begin : g_sram
    sram_sp #(.DEPTH(LINES), .WIDTH(32), .ADDR_W(ADDR_W)) u_sram (
      .clk   (clk),
      .ce    (ce[i]),
      .we    (we[i]),
      .addr  (addr[i]),
      .wdata (wdata[i]),
      .rdata (rdata[i])
    );
  end

endmodule
