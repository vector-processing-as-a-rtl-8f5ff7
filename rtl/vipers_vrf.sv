// vipers_vrf: one lane's partition of the vector register file.
//
// The vector register file is element-partitioned: lane L holds, for every
// one of the NVREG vector registers, the elements L, L+NLANE, L+2*NLANE, ...
// (EPL = MVL/NLANE elements per register). The partition is one block RAM of
// NVREG*EPL words with one write port and two read ports; as in the
// architecture, the two read ports are two copies of the RAM sharing the
// write port. Word address = reg*EPL + slot.
//
// Timing: reads are synchronous (address in cycle t, data in cycle t+1); a
// read of the word being written in the same cycle returns the old value.
module vipers_vrf #(
  parameter int unsigned VPW   = 32,
  parameter int unsigned NVREG = 64,
  parameter int unsigned EPL   = 4
) (
  input  logic                             clk,
  input  logic                             we,
  input  logic [$clog2(NVREG*EPL)-1:0]     waddr,
  input  logic [VPW-1:0]                   wdata,
  input  logic [$clog2(NVREG*EPL)-1:0]     raddr_a,
  input  logic [$clog2(NVREG*EPL)-1:0]     raddr_b,
  output logic [VPW-1:0]                   rdata_a,
  output logic [VPW-1:0]                   rdata_b
);
  localparam int unsigned DEPTH = NVREG * EPL;

  logic [VPW-1:0] ram_a [DEPTH];
  logic [VPW-1:0] ram_b [DEPTH];

  always_ff @(posedge clk) begin
    if (we) begin
      ram_a[waddr] <= wdata;
      ram_b[waddr] <= wdata;
    end
    rdata_a <= ram_a[raddr_a];
    rdata_b <= ram_b[raddr_b];
  end
endmodule
