// vipers_wr_xbar: the memory write interface (data compress and write crossbar).
//
// Places up to NE store elements into one MEMW-bit memory line in a cycle.
// Data compress: each VPW-bit lane element is cut to the access size. Write
// crossbar: every MEMMINW-bit unit u of the line takes unit (u - off[j]) of
// the element j whose span covers u, and its unit enable is raised.
// Elements of one cycle never overlap. The architecture aligns elements with
// a delay network feeding a fixed crossbar; this design instead gives each
// element its own offset and routes it directly, which produces the same
// memory contents in the same number of cycles per line. Purely
// combinational.
module vipers_wr_xbar
  import vipers_pkg::*;
#(
  parameter int unsigned MEMW    = 128,
  parameter int unsigned MEMMINW = 8,
  parameter int unsigned VPW     = 32,
  parameter int unsigned NE      = 4,
  localparam int unsigned NU     = MEMW / MEMMINW,
  localparam int unsigned UW     = (NU <= 1) ? 1 : $clog2(NU)
) (
  input  logic [NE-1:0]            valid,
  input  logic [NE-1:0][VPW-1:0]   data,
  input  logic [NE-1:0][UW-1:0]    off,
  input  msize_e                   size,
  output logic [MEMW-1:0]          line,
  output logic [NU-1:0]            uen      // unit write enables
);
  int unsigned nunits;   // units covered by one element

  always_comb begin
    unique case (size)
      SZ_B:    nunits = 8  / MEMMINW;
      SZ_H:    nunits = 16 / MEMMINW;
      default: nunits = 32 / MEMMINW;
    endcase
    if (nunits == 0) nunits = 1;
    line = '0;
    uen  = '0;
    for (int u = 0; u < int'(NU); u++) begin
      for (int j = 0; j < int'(NE); j++) begin
        if (valid[j] && u >= int'(off[j]) && u < int'(off[j]) + int'(nunits)) begin
          line[u*MEMMINW +: MEMMINW] = data[j][(u - int'(off[j]))*MEMMINW +: MEMMINW];
          uen[u] = 1'b1;
        end
      end
    end
  end
endmodule
