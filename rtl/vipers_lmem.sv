// vipers_lmem: the local memory of one vector lane.
//
// LMEMN words of VPW bits, addressed register-indirectly by each element's
// own address (vldl / vstl). With LMEMSHARE = 0 the memory is split into EPL
// equal sections, one per element slot of the lane, and an element can reach
// only its own section (address taken modulo the section size). With
// LMEMSHARE = 1 the sections are merged and every element of the lane sees
// the whole memory (address modulo LMEMN). Both modes follow the
// architecture; wrapping out-of-range addresses is this design's choice.
//
// Timing: synchronous read, data one cycle after the address; write in the
// cycle the write enable is high.
module vipers_lmem #(
  parameter int unsigned VPW       = 32,
  parameter int unsigned LMEMN     = 256,
  parameter int unsigned EPL       = 4,
  parameter bit          LMEMSHARE = 1'b1
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic                     re,
  input  logic [$clog2(EPL)-1:0]   slot,
  input  logic [VPW-1:0]           addr,
  input  logic [VPW-1:0]           wdata,
  output logic [VPW-1:0]           rdata
);
  localparam int unsigned AW   = $clog2(LMEMN);
  localparam int unsigned SECT = LMEMN / EPL;
  localparam int unsigned SW   = (SECT <= 1) ? 1 : $clog2(SECT);

  logic [VPW-1:0] mem [LMEMN];
  logic [AW-1:0]  eaddr;

  always_comb begin
    if (LMEMSHARE) eaddr = addr[AW-1:0];
    else           eaddr = AW'(slot * SECT) + AW'(addr[SW-1:0]);
  end

  always_ff @(posedge clk) begin
    if (we) mem[eaddr] <= wdata;
    if (re) rdata <= mem[eaddr];
  end
endmodule
