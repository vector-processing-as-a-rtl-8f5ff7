// vipers_shift_chain: the adjacent-element shift chain used by vupshift.
//
// vupshift moves every element of a vector from position i+1 to position i
// and rotates element 0 into position VL-1. Element i lives in lane i%NLANE,
// slot i/NLANE, so while the lanes process slot s, lane L (L < NLANE-1)
// takes the value read by lane L+1 on read port A (same slot), and the last
// lane takes lane 0's value of slot s+1, which lane 0 reads on its second
// read port. Element 0, seen on lane 0 port A in slot 0, is kept in a
// register and delivered to the lane that holds element VL-1. The
// single-direction chain between neighbouring lanes follows the
// architecture; the rotation of element 0 into VL-1 and the use of the
// second read port are this design's choices.
// Timing: combinational from the register file outputs (operand stage);
// the element-0 register loads when first is high.
module vipers_shift_chain #(
  parameter int unsigned VPW   = 32,
  parameter int unsigned NLANE = 16
) (
  input  logic                      clk,
  input  logic                      first,    // operand stage holds slot 0 of a vupshift
  input  logic [7:0]                slot,     // slot in the operand stage
  input  logic [15:0]               vl,
  input  logic [NLANE-1:0][VPW-1:0] rd_a,     // port A data of every lane (slot s)
  input  logic [NLANE-1:0][VPW-1:0] rd_b,     // port B data of every lane (slot s+1)
  output logic [NLANE-1:0][VPW-1:0] nbr
);
  logic [VPW-1:0] elem0_q, elem0;

  assign elem0 = first ? rd_a[0] : elem0_q;

  always_ff @(posedge clk) begin
    if (first) elem0_q <= rd_a[0];
  end

  always_comb begin
    for (int l = 0; l < int'(NLANE); l++) begin
      if (32'(slot) * NLANE + 32'(l) == 32'(vl) - 1)
        nbr[l] = elem0;
      else if (l < int'(NLANE) - 1)
        nbr[l] = rd_a[l+1];
      else
        nbr[l] = rd_b[0];
    end
  end
endmodule
