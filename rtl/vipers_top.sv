// vipers_top: VIPERS-style soft vector processor (vector unit, memory unit
// and main memory), to be attached to a scalar core.
//
// The scalar core issues vector instructions, each with one scalar operand,
// into the instruction queue (instr_*). The vector controller splits each
// instruction into element groups executed by NLANE identical lanes, each
// with its own slice of the 64 vector registers; a MAC chain reduces
// vectors (vmac/vcczacc), a shift chain rotates elements between lanes
// (vupshift), and each lane has a local memory for table lookups
// (vldl/vstl). Vector loads and stores go through per-lane load/store
// buffers, the memory unit and its read/write crossbars to a single-bank,
// MEMW-bit on-chip main memory. Values returned to the scalar core (vmcts,
// vext.vs) leave through the scalar result queue (sres_*). The scalar
// core's own loads and stores use the memory unit's scalar port (smem_*),
// so scalar and vector data share one consistent memory.
//
// Handshakes: instr_valid/instr_ready and sres_valid/sres_ready are
// valid/ready pairs (transfer when both are high at a clock edge). smem_req
// is held until smem_gnt; load data follow with smem_rvalid one cycle after
// the grant. idle is high when no vector work is queued or in flight.
// Reset is asynchronous, active low.
//
// Default parameters are the sixteen-lane full-feature configuration: 16
// lanes, MVL 64, 32-bit lanes, 128-bit memory with byte granularity, MAC
// chain over all 16 lanes, 256-word shared local memory, lane multipliers.
// The scalar core itself (and its instruction memory) is not part of this
// design.
module vipers_top
  import vipers_pkg::*;
#(
  parameter int unsigned NLANE     = 16,
  parameter int unsigned MVL       = 64,
  parameter int unsigned VPW       = 32,
  parameter int unsigned MEMW      = 128,
  parameter int unsigned MEMMINW   = 8,
  parameter int unsigned NVREG     = 64,
  parameter int unsigned MACL      = 4,
  parameter int unsigned LMEMN     = 256,
  parameter bit          LMEMSHARE = 1'b1,
  parameter bit          VMULT     = 1'b1,
  parameter int unsigned MEMDEPTH  = 6144,
  parameter int unsigned IQDEPTH   = 8,
  parameter int unsigned SQDEPTH   = 4,
  parameter int unsigned CQDEPTH   = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  // vector instructions from the scalar core
  input  logic        instr_valid,
  output logic        instr_ready,
  input  logic [31:0] instr,
  input  logic [31:0] instr_scalar,
  // scalar results to the scalar core
  output logic        sres_valid,
  input  logic        sres_ready,
  output logic [31:0] sres_data,
  // scalar core data port
  input  logic        smem_req,
  input  logic        smem_we,
  input  logic [1:0]  smem_size,
  input  logic [31:0] smem_addr,
  input  logic [31:0] smem_wdata,
  output logic        smem_gnt,
  output logic        smem_rvalid,
  output logic [31:0] smem_rdata,
  output logic        idle
);
  localparam int unsigned EPL     = MVL / NLANE;
  localparam int unsigned NCHAIN  = (MACL == 0) ? 1 : NLANE / (4 * MACL);
  localparam int unsigned SBDEPTH = 2 * EPL;
  localparam int unsigned NU      = MEMW / MEMMINW;
  localparam int unsigned LW      = (NLANE <= 1) ? 1 : $clog2(NLANE);

  // ---------------- instruction queue
  logic        iq_empty, iq_full, iq_pop;
  logic [63:0] iq_head;
  vipers_fifo #(.W(64), .DEPTH(IQDEPTH)) u_iq (
    .clk, .rst_n, .push(instr_valid && !iq_full), .wdata({instr_scalar, instr}),
    .pop(iq_pop), .rdata(iq_head), .empty(iq_empty), .full(iq_full), .count()
  );
  assign instr_ready = !iq_full;

  // ---------------- vector controller
  uop_t        u_r, u_o, u_x, u_w;
  logic        cmd_push, cmd_full, cmd_empty, cmd_pop, ld_done;
  memcmd_t     cmd_in, cmd_head;
  logic        sq_push, sq_full, sq_empty;
  logic [31:0] sq_data;
  logic [31:0] ext_sel;
  logic        mac_en, mac_clear, raw_stall, ld_stall, pipe_empty;
  logic [NLANE-1:0]          sb_empty, sb_pop, lb_empty, lb_push, mac_act;
  logic [NLANE-1:0][VPW-1:0] sb_data, sb_off, lb_data, rd_a, rd_b, nbr, mac_a, mac_b, ext_d, ccz;
  logic [NLANE-1:0][$clog2(SBDEPTH+1)-1:0] sb_count;

  vipers_vctrl #(.NLANE(NLANE), .MVL(MVL), .NCHAIN(NCHAIN), .SBDEPTH(SBDEPTH)) u_vctrl (
    .clk, .rst_n,
    .iq_empty, .iq_instr(iq_head[31:0]), .iq_scalar(iq_head[63:32]), .iq_pop,
    .u_r, .u_o, .u_x, .u_w,
    .cmd_push, .cmd(cmd_in), .cmd_full, .ld_done, .sb_count0(sb_count[0]),
    .sres_push(sq_push), .sres_data(sq_data), .sres_full(sq_full), .ext_data(ext_sel),
    .mac_en, .mac_clear, .raw_stall, .ld_stall, .pipe_empty
  );

  assign ext_sel = 32'(ext_d[LW'(u_x.vindex)]);

  // ---------------- lanes
  logic [NCHAIN-1:0][VPW-1:0] chain_sum;

  for (genvar l = 0; l < int'(NLANE); l++) begin : g_lane
    assign ccz[l] = (l < int'(NCHAIN)) ? chain_sum[l % NCHAIN] : '0;
    vipers_lane #(
      .LANE(l), .NLANE(NLANE), .VPW(VPW), .NVREG(NVREG), .EPL(EPL),
      .LMEMN(LMEMN), .LMEMSHARE(LMEMSHARE), .VMULT(VMULT), .SBDEPTH(SBDEPTH)
    ) u_lane (
      .clk, .rst_n, .u_r, .u_o, .u_x, .u_w,
      .rd_a(rd_a[l]), .rd_b(rd_b[l]), .nbr(nbr[l]),
      .mac_act(mac_act[l]), .mac_a(mac_a[l]), .mac_b(mac_b[l]), .ccz_val(ccz[l]),
      .ext_data(ext_d[l]),
      .lb_push(lb_push[l]), .lb_wdata(lb_data[l]), .lb_empty(lb_empty[l]),
      .sb_pop(sb_pop[l]), .sb_data(sb_data[l]), .sb_off(sb_off[l]),
      .sb_empty(sb_empty[l]), .sb_count(sb_count[l])
    );
  end

  // ---------------- shift chain and MAC chain
  vipers_shift_chain #(.VPW(VPW), .NLANE(NLANE)) u_shift (
    .clk, .first(u_o.valid && u_o.kind == U_UPSH && u_o.slot == 0),
    .slot(u_o.slot), .vl(u_o.vl), .rd_a, .rd_b, .nbr
  );

  vipers_mac_chain #(.VPW(VPW), .NLANE(NLANE), .MACL(MACL)) u_mac (
    .clk, .rst_n, .mac_en, .clear(mac_clear), .act(mac_act), .a(mac_a), .b(mac_b),
    .sum(chain_sum)
  );

  // ---------------- scalar result queue
  vipers_fifo #(.W(32), .DEPTH(SQDEPTH)) u_sq (
    .clk, .rst_n, .push(sq_push), .wdata(sq_data), .pop(sres_valid && sres_ready),
    .rdata(sres_data), .empty(sq_empty), .full(sq_full), .count()
  );
  assign sres_valid = !sq_empty;

  // ---------------- memory unit and main memory
  vipers_fifo #(.W($bits(memcmd_t)), .DEPTH(CQDEPTH)) u_cq (
    .clk, .rst_n, .push(cmd_push), .wdata(cmd_in), .pop(cmd_pop),
    .rdata(cmd_head), .empty(cmd_empty), .full(cmd_full), .count()
  );

  logic [$clog2(MEMDEPTH)-1:0] mem_addr;
  logic                        mem_we, mu_busy;
  logic [NU-1:0]               mem_uen;
  logic [MEMW-1:0]             mem_wdata, mem_rdata;

  vipers_memunit #(
    .NLANE(NLANE), .VPW(VPW), .MEMW(MEMW), .MEMMINW(MEMMINW), .DEPTH(MEMDEPTH)
  ) u_mu (
    .clk, .rst_n,
    .cmd_valid(!cmd_empty), .cmd(cmd_head), .cmd_pop,
    .sb_empty, .sb_data, .sb_off, .sb_pop,
    .lb_empty_all(&lb_empty), .lb_push, .lb_data, .ld_done,
    .s_req(smem_req), .s_we(smem_we), .s_size(msize_e'(smem_size)), .s_addr(smem_addr),
    .s_wdata(smem_wdata), .s_gnt(smem_gnt), .s_rvalid(smem_rvalid), .s_rdata(smem_rdata),
    .mem_addr, .mem_we, .mem_uen, .mem_wdata, .mem_rdata, .busy(mu_busy)
  );

  vipers_mainmem #(.MEMW(MEMW), .MEMMINW(MEMMINW), .DEPTH(MEMDEPTH)) u_mem (
    .clk, .addr(mem_addr), .we(mem_we), .uen(mem_uen), .wdata(mem_wdata), .rdata(mem_rdata)
  );

  assign idle = iq_empty && pipe_empty && cmd_empty && !mu_busy && (&sb_empty);
endmodule
