// vipers_mac: one multiply-accumulate unit, shared by four vector lanes.
//
// Models one FPGA DSP block used in multiply-accumulate mode: in a cycle with
// mac_en high it multiplies the LPM pairs of lane operands, adds the products
// of the active lanes and adds that sum to its private (distributed)
// accumulator. clear zeroes the accumulator; when both are high the
// accumulator restarts from the new sum. chain_in is the sum handed down the
// MAC chain by the previous unit and chain_out = chain_in + accumulator is
// handed on. Four lanes per unit and the chain follow the architecture; the
// accumulator width ACCW (2*VPW) and signed products are this design's
// choices. Timing: the accumulator updates at the clock edge; chain_out is
// combinational.
module vipers_mac #(
  parameter int unsigned VPW  = 32,
  parameter int unsigned LPM  = 4,
  parameter int unsigned ACCW = 2 * VPW
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   mac_en,
  input  logic                   clear,
  input  logic [LPM-1:0]         act,
  input  logic [LPM-1:0][VPW-1:0] a,
  input  logic [LPM-1:0][VPW-1:0] b,
  input  logic [ACCW-1:0]        chain_in,
  output logic [ACCW-1:0]        chain_out,
  output logic [ACCW-1:0]        acc
);
  logic [ACCW-1:0] psum;

  always_comb begin
    psum = '0;
    for (int i = 0; i < int'(LPM); i++) begin
      if (act[i])
        psum = psum + ACCW'($signed(a[i]) * $signed(b[i]));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      acc <= '0;
    else if (clear)
      acc <= mac_en ? psum : '0;
    else if (mac_en)
      acc <= acc + psum;
  end

  assign chain_out = chain_in + acc;
endmodule
