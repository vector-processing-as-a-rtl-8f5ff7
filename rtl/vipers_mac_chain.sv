// vipers_mac_chain: the distributed multiply-accumulate chain (vmac/vcczacc).
//
// NLANE/4 MAC units each take the products of four neighbouring lanes. The
// units are grouped into chains of MACL units (4*MACL lanes); within a chain
// each unit adds its accumulator to the running sum passed from the previous
// unit. vmac (mac_en) accumulates one element group per cycle into the
// distributed accumulators. vcczacc reads sum[c], the total of chain c,
// truncated to VPW bits, and asserts clear to zero every accumulator. With
// MACL spanning all lanes there is one result; shorter chains give
// NCHAIN = NLANE/(4*MACL) results, element c holding chain c. MACL = 0
// removes the chain (no MAC hardware; the sums read as zero).
// Structure follows the architecture; timing: accumulators update at the
// clock edge, sums are combinational from the accumulators.
module vipers_mac_chain #(
  parameter int unsigned VPW   = 32,
  parameter int unsigned NLANE = 16,
  parameter int unsigned MACL  = 4,
  localparam int unsigned NMAC   = NLANE / 4,
  localparam int unsigned NCHAIN = (MACL == 0) ? 1 : NLANE / (4 * MACL)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     mac_en,
  input  logic                     clear,
  input  logic [NLANE-1:0]         act,
  input  logic [NLANE-1:0][VPW-1:0] a,
  input  logic [NLANE-1:0][VPW-1:0] b,
  output logic [NCHAIN-1:0][VPW-1:0] sum
);
  localparam int unsigned ACCW = 2 * VPW;

  if (MACL == 0) begin : g_none
    assign sum = '0;
  end else begin : g_mac
    logic [NMAC-1:0][ACCW-1:0] cin, cout;
    for (genvar m = 0; m < int'(NMAC); m++) begin : g_unit
      // the first unit of each chain starts from zero
      if (m % MACL == 0) begin : g_head
        assign cin[m] = '0;
      end else begin : g_link
        assign cin[m] = cout[m-1];
      end
      vipers_mac #(.VPW(VPW), .LPM(4), .ACCW(ACCW)) u_mac (
        .clk, .rst_n, .mac_en, .clear,
        .act(act[4*m +: 4]), .a(a[4*m +: 4]), .b(b[4*m +: 4]),
        .chain_in(cin[m]), .chain_out(cout[m]), .acc()
      );
    end
    for (genvar c = 0; c < int'(NCHAIN); c++) begin : g_sum
      assign sum[c] = cout[c*MACL + MACL - 1][VPW-1:0];
    end
  end
endmodule
