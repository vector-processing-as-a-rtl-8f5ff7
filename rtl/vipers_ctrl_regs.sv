// vipers_ctrl_regs: the vector control registers.
//
// Holds the vector length VL, the element index VINDEX used by vector
// insert/extract, MASKSEL (which flag register masks execution), and eight
// each of the memory address registers vbase (byte address), vinc
// (auto-increment in bytes) and vstride (stride in elements). The scalar
// core writes them with vmstc (we/waddr/wdata) and reads them with vmcts
// (raddr/rdata). A vector memory instruction may add vinc[i] to vbase[b]
// after use (inc_en). vcczacc sets VL to the number of MAC chain results
// (vl_set). Register numbers are in vipers_pkg. The register names come from
// the architecture's programming examples; their number, numbering and reset
// values (VL = MVL, all else 0) are this design's choices. All writes take
// effect at the clock edge; reads are combinational.
module vipers_ctrl_regs
  import vipers_pkg::*;
#(
  parameter int unsigned MVL = 64
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        we,
  input  logic [5:0]  waddr,
  input  logic [31:0] wdata,
  input  logic [5:0]  raddr,
  output logic [31:0] rdata,
  input  logic        inc_en,
  input  logic [2:0]  inc_base,
  input  logic [2:0]  inc_sel,
  input  logic        vl_set,
  input  logic [15:0] vl_set_val,
  output logic [15:0] vl,
  output logic [15:0] vindex,
  output logic        masksel,
  output logic [NBASE-1:0][31:0] vbase,
  output logic [NBASE-1:0][31:0] vinc,
  output logic [NBASE-1:0][31:0] vstride
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vl      <= 16'(MVL);
      vindex  <= '0;
      masksel <= 1'b0;
      vbase   <= '0;
      vinc    <= '0;
      vstride <= '0;
    end else begin
      if (we) begin
        if (waddr == 6'(CR_VL))
          vl <= (wdata > 32'(MVL)) ? 16'(MVL) : wdata[15:0];
        else if (waddr == 6'(CR_VINDEX))  vindex  <= wdata[15:0];
        else if (waddr == 6'(CR_MASKSEL)) masksel <= wdata[0];
        else if (waddr >= 6'(CR_VBASE) && waddr < 6'(CR_VBASE + NBASE))
          vbase[waddr[2:0]] <= wdata;
        else if (waddr >= 6'(CR_VINC) && waddr < 6'(CR_VINC + NBASE))
          vinc[waddr[2:0]] <= wdata;
        else if (waddr >= 6'(CR_VSTRIDE) && waddr < 6'(CR_VSTRIDE + NBASE))
          vstride[waddr[2:0]] <= wdata;
      end
      if (inc_en) vbase[inc_base] <= vbase[inc_base] + vinc[inc_sel];
      if (vl_set) vl <= vl_set_val;
    end
  end

  always_comb begin
    rdata = '0;
    if (raddr == 6'(CR_VL))            rdata = 32'(vl);
    else if (raddr == 6'(CR_VINDEX))   rdata = 32'(vindex);
    else if (raddr == 6'(CR_MASKSEL))  rdata = 32'(masksel);
    else if (raddr >= 6'(CR_VBASE) && raddr < 6'(CR_VBASE + NBASE))     rdata = vbase[raddr[2:0]];
    else if (raddr >= 6'(CR_VINC) && raddr < 6'(CR_VINC + NBASE))       rdata = vinc[raddr[2:0]];
    else if (raddr >= 6'(CR_VSTRIDE) && raddr < 6'(CR_VSTRIDE + NBASE)) rdata = vstride[raddr[2:0]];
  end
endmodule
