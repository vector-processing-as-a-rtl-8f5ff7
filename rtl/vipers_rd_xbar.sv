// vipers_rd_xbar: the memory read crossbar.
//
// Picks up to NE elements out of one MEMW-bit memory line in a single cycle.
// Each output slot j has its own offset into the line, counted in units of
// MEMMINW bits (the smallest accessible width, which sets the crossbar's
// granularity), and all slots share the access size. The element is shifted
// down to bit 0, cut to the access size and sign or zero extended to VPW
// bits. The crossbar and the MemMinWidth granularity follow the architecture;
// the shift-and-extend structure is this design's. Purely combinational.
module vipers_rd_xbar
  import vipers_pkg::*;
#(
  parameter int unsigned MEMW    = 128,
  parameter int unsigned MEMMINW = 8,
  parameter int unsigned VPW     = 32,
  parameter int unsigned NE      = 16,
  localparam int unsigned NU     = MEMW / MEMMINW,
  localparam int unsigned UW     = (NU <= 1) ? 1 : $clog2(NU)
) (
  input  logic [MEMW-1:0]          line,
  input  logic [NE-1:0][UW-1:0]    off,
  input  msize_e                   size,
  input  logic                     sext,
  output logic [NE-1:0][VPW-1:0]   elem
);
  always_comb begin
    for (int j = 0; j < int'(NE); j++) begin
      logic [MEMW-1:0] sh;
      sh = line >> (32'(off[j]) * MEMMINW);
      unique case (size)
        SZ_B:    elem[j] = sext ? VPW'($signed(sh[7:0]))  : VPW'(sh[7:0]);
        SZ_H:    elem[j] = sext ? VPW'($signed(sh[15:0])) : VPW'(sh[15:0]);
        default: elem[j] = VPW'(sh[31:0]);
      endcase
    end
  end
endmodule
