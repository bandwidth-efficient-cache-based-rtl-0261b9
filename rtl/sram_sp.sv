// sram_sp: single-port synchronous SRAM, one access per cycle.
//
// ce selects the macro; with we=1 wdata is written at addr, with we=0 the
// word at addr appears on rdata after the clock edge (one-cycle read
// latency) and is held until the next read. Written as a plain array so a
// synthesis flow can map it to a memory macro.
module sram_sp #(
  parameter int unsigned DEPTH  = 96,
  parameter int unsigned WIDTH  = 32,
  parameter int unsigned ADDR_W = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              ce,
  input  logic              we,
  input  logic [ADDR_W-1:0] addr,
  input  logic [WIDTH-1:0]  wdata,
  output logic [WIDTH-1:0]  rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (ce) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end

endmodule
