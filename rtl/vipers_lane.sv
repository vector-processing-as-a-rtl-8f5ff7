// vipers_lane: one vector lane.
//
// A lane holds its partition of the vector register file (elements L,
// L+NLANE, ... of all NVREG registers) and of the two flag registers, a
// copy of the functional units (ALU with optional multiplier, barrel
// shifter), an optional local memory, and the load and store buffers that
// decouple it from the memory crossbars. All lanes receive the same
// micro-operations from the vector controller; each acts on its own element
// of the current element group (slot), and only where that element lies
// below VL and, for masked instructions, where its flag is set.
//
// Pipeline (the same micro-op struct moves through four stages, kept by the
// controller and passed in as u_r, u_o, u_x, u_w):
//   R  register file addresses presented (synchronous read)
//   O  register data arrive, flag read, operands selected (scalar broadcast
//      or shift-chain neighbour) and registered
//   X  ALU / shifter / multiplier, local memory access, load buffer pop,
//      store buffer push, MAC operands out; result registered
//   W  result (or local memory read data) written to the register file,
//      compare result written to the flag register
// A register written in W can be read by an op in R one cycle later, so a
// dependent element group must trail its producer by four cycles; the
// controller enforces this. The lane content follows the architecture;
// the stage split is this design's.
module vipers_lane
  import vipers_pkg::*;
#(
  parameter int unsigned LANE      = 0,
  parameter int unsigned NLANE     = 16,
  parameter int unsigned VPW       = 32,
  parameter int unsigned NVREG     = 64,
  parameter int unsigned EPL       = 4,
  parameter int unsigned LMEMN     = 256,
  parameter bit          LMEMSHARE = 1'b1,
  parameter bit          VMULT     = 1'b1,
  parameter int unsigned SBDEPTH   = 2 * EPL,
  localparam int unsigned RAW      = $clog2(NVREG * EPL)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  uop_t             u_r,
  input  uop_t             u_o,
  input  uop_t             u_x,
  input  uop_t             u_w,
  // register file read data (to the shift chain) and neighbour value
  output logic [VPW-1:0]   rd_a,
  output logic [VPW-1:0]   rd_b,
  input  logic [VPW-1:0]   nbr,
  // MAC chain
  output logic             mac_act,
  output logic [VPW-1:0]   mac_a,
  output logic [VPW-1:0]   mac_b,
  input  logic [VPW-1:0]   ccz_val,
  // extract to the scalar core
  output logic [VPW-1:0]   ext_data,
  // load buffer (filled by the memory unit)
  input  logic             lb_push,
  input  logic [VPW-1:0]   lb_wdata,
  output logic             lb_empty,
  // store buffer (emptied by the memory unit)
  input  logic             sb_pop,
  output logic [VPW-1:0]   sb_data,
  output logic [VPW-1:0]   sb_off,
  output logic             sb_empty,
  output logic [$clog2(SBDEPTH+1)-1:0] sb_count
);
  localparam int unsigned SW = $clog2(EPL);

  function automatic logic [RAW-1:0] ra(logic [5:0] r, logic [7:0] s);
    return RAW'(32'(r) * EPL + 32'(s));
  endfunction

  function automatic logic is_shift(vfunc_e f);
    return f inside {F_SLL, F_SRL, F_SRA, F_ROT};
  endfunction

  // ---- stage R: register file and flags
  logic           rf_we;
  logic [RAW-1:0] rf_waddr;
  logic [VPW-1:0] rf_wdata;
  logic [7:0]     slot_b;

  assign slot_b = (u_r.kind == U_UPSH) ? u_r.slot + 8'd1 : u_r.slot;

  vipers_vrf #(.VPW(VPW), .NVREG(NVREG), .EPL(EPL)) u_vrf (
    .clk,
    .we(rf_we), .waddr(rf_waddr), .wdata(rf_wdata),
    .raddr_a(ra(u_r.va, u_r.slot)),
    .raddr_b((u_r.kind == U_UPSH) ? ra(u_r.va, slot_b) : ra(u_r.vb, u_r.slot)),
    .rdata_a(rd_a), .rdata_b(rd_b)
  );

  logic flag_o, fl_we, fl_wdata;
  vipers_vflags #(.EPL(EPL), .NFLAG(2)) u_flags (
    .clk, .rst_n,
    .we(fl_we), .wsel(u_w.vd[0]), .wslot(SW'(u_w.slot)), .wdata(fl_wdata),
    .rsel(u_o.msel), .rslot(SW'(u_o.slot)), .rdata(flag_o)
  );

  // ---- stage O: operand selection
  logic [31:0]    elem_o;
  logic           act_o;
  logic [VPW-1:0] x_a, x_b;
  logic           x_act, x_flag;

  always_comb begin
    elem_o = 32'(u_o.slot) * NLANE + LANE;
    if (u_o.kind == U_EXT || u_o.kind == U_INS)
      act_o = u_o.valid && (elem_o == 32'(u_o.vindex));
    else
      act_o = u_o.valid && (elem_o < 32'(u_o.vl)) && (!u_o.mask || flag_o);
  end

  always_ff @(posedge clk) begin
    x_a    <= rd_a;
    x_b    <= u_o.vs ? VPW'(u_o.scalar) : (u_o.kind == U_UPSH) ? nbr : rd_b;
    x_flag <= flag_o;
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) x_act <= 1'b0;
    else        x_act <= act_o;
  end

  // ---- stage X: execute
  logic [VPW-1:0] alu_res, sh_res, x_res, lb_head, lm_rdata;
  logic           alu_cmp;

  vipers_alu #(.VPW(VPW), .VMULT(VMULT)) u_alu (
    .func(u_x.func), .a(x_a), .b(x_b), .flag(x_flag), .result(alu_res), .cmp(alu_cmp)
  );

  vipers_shifter #(.VPW(VPW)) u_sh (
    .din(x_a), .amt(x_b[$clog2(VPW)-1:0]),
    .op((u_x.func == F_SLL) ? 2'd0 : (u_x.func == F_SRL) ? 2'd1 :
        (u_x.func == F_SRA) ? 2'd2 : 2'd3),
    .dout(sh_res)
  );

  always_comb begin
    unique case (u_x.kind)
      U_LDWB:  x_res = lb_head;
      U_CCZ:   x_res = ccz_val;
      U_INS:   x_res = VPW'(u_x.scalar);
      U_UPSH:  x_res = x_b;
      default: x_res = is_shift(u_x.func) ? sh_res : alu_res;
    endcase
  end

  assign mac_act  = u_x.valid && u_x.kind == U_MAC && x_act;
  assign mac_a    = x_a;
  assign mac_b    = x_b;
  assign ext_data = x_a;

  // local memory
  if (LMEMN > 0) begin : g_lmem
    vipers_lmem #(.VPW(VPW), .LMEMN(LMEMN), .EPL(EPL), .LMEMSHARE(LMEMSHARE)) u_lmem (
      .clk,
      .we(u_x.valid && u_x.kind == U_STL && x_act),
      .re(u_x.valid && u_x.kind == U_LDL),
      .slot(SW'(u_x.slot)), .addr(x_a), .wdata(x_b), .rdata(lm_rdata)
    );
  end else begin : g_no_lmem
    assign lm_rdata = '0;
  end

  // load buffer
  logic lb_pop;
  assign lb_pop = u_x.valid && u_x.kind == U_LDWB && x_act;
  vipers_fifo #(.W(VPW), .DEPTH(EPL)) u_lb (
    .clk, .rst_n, .push(lb_push), .wdata(lb_wdata), .pop(lb_pop),
    .rdata(lb_head), .empty(lb_empty), .full(), .count()
  );

  // store buffer: {data, index offset}
  logic            sb_push;
  logic [2*VPW-1:0] sb_in, sb_head;
  assign sb_push = u_x.valid && (u_x.kind == U_STRD || u_x.kind == U_IDXRD) && x_act;
  assign sb_in   = (u_x.kind == U_IDXRD) ? {{VPW{1'b0}}, x_a} : {x_a, x_b};
  vipers_fifo #(.W(2*VPW), .DEPTH(SBDEPTH)) u_sb (
    .clk, .rst_n, .push(sb_push), .wdata(sb_in), .pop(sb_pop),
    .rdata(sb_head), .empty(sb_empty), .full(), .count(sb_count)
  );
  assign sb_data = sb_head[2*VPW-1:VPW];
  assign sb_off  = sb_head[VPW-1:0];

  // ---- stage W: write back
  logic [VPW-1:0] w_res;
  logic           w_act, w_cmp;
  always_ff @(posedge clk) begin
    w_res <= x_res;
    w_cmp <= alu_cmp;
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) w_act <= 1'b0;
    else        w_act <= x_act;
  end

  assign rf_we    = u_w.valid && u_w.wvreg && w_act;
  assign rf_waddr = ra(u_w.vd, u_w.slot);
  assign rf_wdata = (u_w.kind == U_LDL) ? lm_rdata : w_res;
  assign fl_we    = u_w.valid && u_w.wflag && w_act;
  assign fl_wdata = w_cmp;
endmodule
