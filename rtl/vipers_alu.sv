// vipers_alu: arithmetic unit of one vector lane.
//
// Computes one element result per cycle: add, subtract, the logic operations,
// signed and unsigned maximum/minimum, absolute value, signed and unsigned
// absolute difference (vabsdiff), merge under a flag, move, the comparisons
// that produce a flag bit, and, when VMULT = 1, the lane multiplier (low or
// high half of the product). The operation list follows the architecture's
// description of the lane ALU and its optional multiplier; the encodings and
// the exact set of comparisons are this design's choice. Shift and rotate
// operations are done by vipers_shifter and are not handled here.
// Purely combinational; the lane registers the result.
module vipers_alu
  import vipers_pkg::*;
#(
  parameter int unsigned VPW   = 32,
  parameter bit          VMULT = 1'b1
) (
  input  vfunc_e         func,
  input  logic [VPW-1:0] a,
  input  logic [VPW-1:0] b,
  input  logic           flag,     // element flag, used by merge
  output logic [VPW-1:0] result,
  output logic           cmp       // comparison result for the compare ops
);
  logic signed [VPW-1:0]   sa, sb;
  logic [VPW:0]            diff;   // a - b with borrow
  logic                    lt_s, lt_u;
  logic signed [2*VPW-1:0] prod_s;
  logic [2*VPW-1:0]        prod_u;

  assign sa     = a;
  assign sb     = b;
  assign diff   = {1'b0, a} - {1'b0, b};
  assign lt_u   = diff[VPW];
  assign lt_s   = sa < sb;
  // the operands are widened explicitly: inside a conditional with an
  // unsigned arm the multiply would otherwise be evaluated unsigned
  assign prod_s = VMULT ? (2*VPW)'({{VPW{sa[VPW-1]}}, sa} * {{VPW{sb[VPW-1]}}, sb}) : '0;
  assign prod_u = VMULT ? (2*VPW)'({{VPW{1'b0}}, a} * {{VPW{1'b0}}, b}) : '0;

  always_comb begin
    result = '0;
    cmp    = 1'b0;
    unique case (func)
      F_ADD:      result = a + b;
      F_SUB:      result = diff[VPW-1:0];
      F_AND:      result = a & b;
      F_OR:       result = a | b;
      F_XOR:      result = a ^ b;
      F_NOR:      result = ~(a | b);
      F_MAX:      result = lt_s ? b : a;
      F_MIN:      result = lt_s ? a : b;
      F_MAXU:     result = lt_u ? b : a;
      F_MINU:     result = lt_u ? a : b;
      F_ABS:      result = a[VPW-1] ? -a : a;
      F_ABSDIFF:  result = lt_s ? b - a : a - b;
      F_ABSDIFFU: result = lt_u ? b - a : a - b;
      F_MERGE:    result = flag ? a : b;
      F_MOV:      result = a;
      F_CMPEQ:    cmp = (a == b);
      F_CMPNE:    cmp = (a != b);
      F_CMPLT:    cmp = lt_s;
      F_CMPLE:    cmp = lt_s || (a == b);
      F_CMPLTU:   cmp = lt_u;
      F_CMPLEU:   cmp = lt_u || (a == b);
      F_MUL:      result = prod_u[VPW-1:0];
      F_MULHI:    result = prod_s[2*VPW-1:VPW];
      F_MULHIU:   result = prod_u[2*VPW-1:VPW];
      default:    result = a;
    endcase
  end
endmodule
