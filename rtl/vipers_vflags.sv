// vipers_vflags: one lane's partition of the two vector flag registers.
//
// Each flag register holds one bit per element; the lane keeps the EPL bits
// of its own elements for each of the NFLAG (= 2) registers. Flags are
// written by compare instructions and read to mask execution or to choose
// the operand of a merge. The number of flag registers follows the
// architecture; the storage as flip-flops with a combinational read (so the
// flag can be read in the same stage as the RAM data arrives) and the reset
// to all ones (everything enabled) are this design's choices.
module vipers_vflags #(
  parameter int unsigned EPL   = 4,
  parameter int unsigned NFLAG = 2
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       we,
  input  logic [$clog2(NFLAG)-1:0]   wsel,
  input  logic [$clog2(EPL)-1:0]     wslot,
  input  logic                       wdata,
  input  logic [$clog2(NFLAG)-1:0]   rsel,
  input  logic [$clog2(EPL)-1:0]     rslot,
  output logic                       rdata
);
  logic [EPL-1:0] flags [NFLAG];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(NFLAG); i++) flags[i] <= '1;
    end else if (we) begin
      flags[wsel][wslot] <= wdata;
    end
  end

  assign rdata = flags[rsel][rslot];
endmodule
