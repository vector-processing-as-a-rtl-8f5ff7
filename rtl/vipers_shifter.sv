// vipers_shifter: the single-cycle barrel shifter of a vector lane.
//
// Shifts or rotates a VPW-bit element by the low log2(VPW) bits of the shift
// amount, using log2(VPW) levels of 2:1 multiplexers, one level per bit of the
// amount (level k moves the data by 2**k positions). The multiplexer-level
// structure follows the architecture; the operation set (logical left, logical
// right, arithmetic right, rotate right) is this design's choice, rotate being
// needed by table-based AES code. Purely combinational.
//
//   op: 0 sll, 1 srl, 2 sra, 3 rotate right
module vipers_shifter #(
  parameter int unsigned VPW = 32
) (
  input  logic [VPW-1:0]         din,
  input  logic [$clog2(VPW)-1:0] amt,
  input  logic [1:0]             op,
  output logic [VPW-1:0]         dout
);
  localparam int unsigned LV = $clog2(VPW);

  logic [VPW-1:0] stage [LV+1];
  logic           fill;

  always_comb begin
    fill = (op == 2'd2) ? din[VPW-1] : 1'b0;
    stage[0] = din;
    for (int unsigned k = 0; k < LV; k++) begin
      if (amt[k]) begin
        unique case (op)
          2'd0:    stage[k+1] = stage[k] << (1 << k);
          2'd3:    stage[k+1] = (stage[k] >> (1 << k)) | (stage[k] << (VPW - (1 << k)));
          default: stage[k+1] = (stage[k] >> (1 << k)) | ({VPW{fill}} << (VPW - (1 << k)));
        endcase
      end else begin
        stage[k+1] = stage[k];
      end
    end
    dout = stage[LV];
  end
endmodule
