// vipers_mainmem: single-bank on-chip main memory.
//
// DEPTH lines of MEMW bits with a write enable per MEMMINW-bit unit. One
// access per cycle: a write stores the enabled units of wdata; every cycle
// the line at addr is read and appears on rdata in the next cycle (a read
// of a line written in the same cycle returns the old contents). The
// single-cycle, single-bank, MemWidth-wide organisation follows the
// architecture; DEPTH (6144 lines = 96 KiB, the smallest capacity the
// architecture quotes) and the synchronous read are this design's choices.
module vipers_mainmem #(
  parameter int unsigned MEMW    = 128,
  parameter int unsigned MEMMINW = 8,
  parameter int unsigned DEPTH   = 6144,
  localparam int unsigned NU     = MEMW / MEMMINW
) (
  input  logic                     clk,
  input  logic [$clog2(DEPTH)-1:0] addr,
  input  logic                     we,
  input  logic [NU-1:0]            uen,
  input  logic [MEMW-1:0]          wdata,
  output logic [MEMW-1:0]          rdata
);
  logic [MEMW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) begin
      for (int u = 0; u < int'(NU); u++)
        if (uen[u]) mem[addr][u*MEMMINW +: MEMMINW] <= wdata[u*MEMMINW +: MEMMINW];
    end
    rdata <= mem[addr];
  end
endmodule
