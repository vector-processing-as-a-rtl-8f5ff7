// vipers_vctrl: vector instruction decoder, issue logic and hazard interlock.
//
// Takes vector instructions, each with the scalar operand the scalar core
// sent along, from the instruction queue and executes them in program order.
// An arithmetic instruction of vector length VL is split into
// G = ceil(VL/NLANE) element groups issued on consecutive cycles, each group
// being one micro-op (uop_t) that all lanes execute on their own element of
// that slot (hybrid vector-SIMD execution). Micro-ops then move through the
// operand, execute and write-back stages (u_o, u_x, u_w); the controller
// keeps these stage registers and every lane decodes them.
//
// Read-after-write hazards: there is no forwarding. A micro-op that reads a
// (register, slot) pair, or a flag, still being written by a micro-op in
// O, X or W waits in R; a dependent instruction therefore loses cycles when
// its producer has fewer than four element groups (raw_stall). Registers
// that are the target of an outstanding vector load cannot be read or
// written until the load has been written back (ld_stall).
//
// Vector memory instructions: unit and strided loads only queue a command to
// the memory unit (one cycle) and continue; indexed loads first copy the
// index register into the store buffers, stores copy their data (and
// index) register there, then queue the command. vbase is incremented by
// the named vinc register when the command is queued. When the memory unit
// has filled the load buffers (ld_done), the controller inserts write-back
// micro-ops that move them into the register file, ahead of the next
// instruction.
//
// Control instructions (vmstc, vmcts) execute in the issue cycle; vext.vs
// returns element VINDEX to the scalar queue from the X stage; vins.vs
// writes the scalar into element VINDEX. vcczacc sets VL to the number of
// MAC chains. Instruction split, interlock and load write-back follow the
// architecture; encodings, queue checks and stage boundaries are this
// design's.
module vipers_vctrl
  import vipers_pkg::*;
#(
  parameter int unsigned NLANE   = 16,
  parameter int unsigned MVL     = 64,
  parameter int unsigned NCHAIN  = 1,
  parameter int unsigned SBDEPTH = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  // instruction queue head
  input  logic        iq_empty,
  input  logic [31:0] iq_instr,
  input  logic [31:0] iq_scalar,
  output logic        iq_pop,
  // micro-op stages
  output uop_t        u_r,
  output uop_t        u_o,
  output uop_t        u_x,
  output uop_t        u_w,
  // memory unit command queue
  output logic        cmd_push,
  output memcmd_t     cmd,
  input  logic        cmd_full,
  input  logic        ld_done,
  input  logic [$clog2(SBDEPTH+1)-1:0] sb_count0,
  // scalar result queue
  output logic        sres_push,
  output logic [31:0] sres_data,
  input  logic        sres_full,
  input  logic [31:0] ext_data,
  // MAC chain
  output logic        mac_en,
  output logic        mac_clear,
  // status
  output logic        raw_stall,
  output logic        ld_stall,
  output logic        pipe_empty
);
  localparam int unsigned LW = (NLANE <= 1) ? 1 : $clog2(NLANE);

  // ---------------- control registers
  logic        cr_we, inc_en, vl_set;
  logic [5:0]  cr_waddr, cr_raddr;
  logic [31:0] cr_rdata;
  logic [2:0]  inc_base, inc_sel;
  logic [15:0] vl, vindex;
  logic        masksel;
  logic [NBASE-1:0][31:0] vbase, vinc, vstride;

  vipers_ctrl_regs #(.MVL(MVL)) u_cr (
    .clk, .rst_n,
    .we(cr_we), .waddr(cr_waddr), .wdata(iq_scalar),
    .raddr(cr_raddr), .rdata(cr_rdata),
    .inc_en, .inc_base, .inc_sel,
    .vl_set, .vl_set_val(16'(NCHAIN)),
    .vl, .vindex, .masksel, .vbase, .vinc, .vstride
  );

  // ---------------- outstanding loads
  logic        li_push, li_pop, li_empty, li_full;
  logic [21:0] li_head;
  logic [63:0] pend_ld;
  logic [2:0]  wb_cnt;
  logic        wb_act;
  logic [7:0]  grp;

  vipers_fifo #(.W(22), .DEPTH(4)) u_ldinfo (
    .clk, .rst_n, .push(li_push), .wdata({vl, iq_instr[29:24]}), .pop(li_pop),
    .rdata(li_head), .empty(li_empty), .full(li_full), .count()
  );

  // ---------------- decode of the queue head
  logic [5:0]  op;
  logic [5:0]  fn;
  logic [5:0]  f_vd, f_va, f_vb;
  logic        is_arith, is_mem, is_ctrl;
  vfunc_e      vf;
  mfunc_e      mf;
  cfunc_e      cf;
  logic        m_store, m_index, m_stride;
  logic [15:0] ivl;
  logic [7:0]  ngrp;

  assign op       = iq_instr[5:0];
  assign fn       = iq_instr[11:6];
  assign f_vd     = iq_instr[29:24];
  assign f_va     = iq_instr[23:18];
  assign f_vb     = iq_instr[17:12];
  assign is_arith = (op == OP_VARITH);
  assign is_mem   = (op == OP_VMEM);
  assign is_ctrl  = (op == OP_VCTRL);
  assign vf       = vfunc_e'(fn);
  assign mf       = mfunc_e'(fn);
  assign cf       = cfunc_e'(fn);
  assign m_store  = mf inside {M_ST, M_STS, M_STX};
  assign m_index  = mf inside {M_LDX, M_LDXU, M_STX};
  assign m_stride = mf inside {M_LDS, M_LDSU, M_STS};

  function automatic logic is_cmp(vfunc_e f);
    return f inside {F_CMPEQ, F_CMPNE, F_CMPLT, F_CMPLE, F_CMPLTU, F_CMPLEU};
  endfunction

  always_comb begin
    ivl = (is_arith && vf == F_CCZACC) ? 16'(NCHAIN) : vl;
    if (is_arith && vf == F_CCZACC) ngrp = 8'd1;
    else if (is_ctrl) ngrp = 8'd1;
    else if (is_mem && !m_store && !m_index) ngrp = 8'd1;
    else if (vl == 0) ngrp = 8'd1;
    else ngrp = 8'((32'(vl) + NLANE - 1) / NLANE);
  end

  // candidate micro-op of the queue head, group grp
  uop_t  cand;
  logic  rd_a_v, rd_b_v, rd_f_v;
  logic [5:0] rd_a_r, rd_b_r;
  logic [7:0] rd_b_s;

  always_comb begin
    cand        = '0;
    cand.func   = vf;
    cand.vd     = f_vd;
    cand.va     = f_va;
    cand.vb     = f_vb;
    cand.slot   = grp;
    cand.vs     = iq_instr[30];
    cand.scalar = iq_scalar;
    cand.mask   = iq_instr[31];
    cand.msel   = masksel;
    cand.vl     = ivl;
    cand.vindex = vindex;
    cand.kind   = U_ALU;
    rd_a_v = 1'b0; rd_b_v = 1'b0; rd_f_v = 1'b0;
    if (is_arith) begin
      cand.valid = 1'b1;
      unique case (vf)
        F_MAC:     begin cand.kind = U_MAC;  rd_a_v = 1'b1; rd_b_v = !cand.vs; end
        F_CCZACC:  begin cand.kind = U_CCZ;  cand.wvreg = 1'b1; cand.mask = 1'b0; end
        F_UPSHIFT: begin cand.kind = U_UPSH; cand.wvreg = 1'b1; rd_a_v = 1'b1; rd_b_v = 1'b1;
                         cand.vs = 1'b0; end
        F_LDL:     begin cand.kind = U_LDL;  cand.wvreg = 1'b1; rd_a_v = 1'b1; end
        F_STL:     begin cand.kind = U_STL;  rd_a_v = 1'b1; rd_b_v = !cand.vs; end
        default: begin
          cand.kind  = U_ALU;
          cand.wflag = is_cmp(vf);
          cand.wvreg = !is_cmp(vf);
          rd_a_v     = 1'b1;
          rd_b_v     = !cand.vs && !(vf inside {F_ABS, F_MOV});
          rd_f_v     = (vf == F_MERGE);
        end
      endcase
      if (cand.mask) rd_f_v = 1'b1;
    end else if (is_mem && (m_store || m_index)) begin
      cand.valid = 1'b1;
      cand.vs    = 1'b0;
      cand.mask  = 1'b0;
      if (m_store) begin
        cand.kind = U_STRD;
        cand.va   = f_vd;               // data register
        cand.vb   = f_va;               // index register
        rd_a_v    = 1'b1;
        rd_b_v    = m_index;
      end else begin
        cand.kind = U_IDXRD;
        cand.va   = f_va;
        rd_a_v    = 1'b1;
      end
    end else if (is_ctrl && (cf == C_EXTVS || cf == C_INSVS)) begin
      cand.valid = 1'b1;
      cand.mask  = 1'b0;
      cand.slot  = 8'(32'(vindex) / NLANE);
      if (cf == C_EXTVS) begin
        cand.kind = U_EXT;
        cand.va   = f_vd;
        rd_a_v    = 1'b1;
      end else begin
        cand.kind  = U_INS;
        cand.wvreg = 1'b1;
      end
    end
    rd_a_r = cand.va;
    rd_b_r = (cand.kind == U_UPSH) ? cand.va : cand.vb;
    rd_b_s = (cand.kind == U_UPSH) ? cand.slot + 8'd1 : cand.slot;
  end

  // ---------------- hazard detection
  function automatic logic writes(uop_t u, logic [5:0] r, logic [7:0] s);
    return u.valid && u.wvreg && u.vd == r && u.slot == s;
  endfunction
  function automatic logic writes_f(uop_t u, logic f, logic [7:0] s);
    return u.valid && u.wflag && u.vd[0] == f && u.slot == s;
  endfunction

  logic haz_raw, haz_ld, haz_struct;
  logic [1:0] sb_inflight;

  always_comb begin
    haz_raw = 1'b0;
    if (rd_a_v && (writes(u_o, rd_a_r, cand.slot) || writes(u_x, rd_a_r, cand.slot) ||
                   writes(u_w, rd_a_r, cand.slot))) haz_raw = 1'b1;
    if (rd_b_v && (writes(u_o, rd_b_r, rd_b_s) || writes(u_x, rd_b_r, rd_b_s) ||
                   writes(u_w, rd_b_r, rd_b_s))) haz_raw = 1'b1;
    if (rd_f_v && (writes_f(u_o, cand.msel, cand.slot) || writes_f(u_x, cand.msel, cand.slot) ||
                   writes_f(u_w, cand.msel, cand.slot))) haz_raw = 1'b1;
    // memory instructions check outstanding loads once, when they queue
    // their command (their own destination is pending after that)
    haz_ld = 1'b0;
    if (is_arith || (is_ctrl && (cf == C_EXTVS || cf == C_INSVS))) begin
      if ((rd_a_v && pend_ld[rd_a_r]) || (rd_b_v && pend_ld[rd_b_r]) ||
          (cand.wvreg && pend_ld[cand.vd])) haz_ld = 1'b1;
    end else if (is_mem && grp == 0) begin
      if (pend_ld[f_vd] || (m_index && pend_ld[f_va])) haz_ld = 1'b1;
    end
    sb_inflight = 2'((u_o.valid && (u_o.kind inside {U_STRD, U_IDXRD})) ? 1 : 0)
                + 2'((u_x.valid && (u_x.kind inside {U_STRD, U_IDXRD})) ? 1 : 0);
    haz_struct = 1'b0;
    if (is_mem && grp == 0) begin
      if (cmd_full) haz_struct = 1'b1;
      if (!m_store && li_full) haz_struct = 1'b1;
      if ((m_store || m_index) &&
          32'(sb_count0) + 32'(sb_inflight) + 32'(ngrp) > SBDEPTH) haz_struct = 1'b1;
    end
    if (is_ctrl && (cf == C_MCTS || cf == C_EXTVS)) begin
      if (sres_full || (u_o.valid && u_o.kind == U_EXT) || (u_x.valid && u_x.kind == U_EXT))
        haz_struct = 1'b1;
    end
  end

  // ---------------- issue
  logic wb_start, issue;
  uop_t wb_uop;
  logic [7:0] wb_ngrp;

  assign wb_start  = !wb_act && wb_cnt != 0 && grp == 0;
  assign wb_ngrp   = (li_head[21:6] == 0) ? 8'd1 : 8'((32'(li_head[21:6]) + NLANE - 1) / NLANE);
  assign issue     = !wb_act && !wb_start && !iq_empty && !haz_raw && !haz_ld && !haz_struct;
  assign raw_stall = !wb_act && !wb_start && !iq_empty && haz_raw;
  assign ld_stall  = !wb_act && !wb_start && !iq_empty && !haz_raw && haz_ld;

  always_comb begin
    wb_uop       = '0;
    wb_uop.valid = 1'b1;
    wb_uop.kind  = U_LDWB;
    wb_uop.func  = F_MOV;
    wb_uop.vd    = li_head[5:0];
    wb_uop.vl    = li_head[21:6];
    wb_uop.slot  = grp;
    wb_uop.wvreg = 1'b1;
  end

  always_comb begin
    u_r = '0;
    if (wb_act || wb_start) u_r = wb_uop;
    else if (issue)         u_r = cand;
  end

  logic last_grp;
  assign last_grp = (grp + 8'd1 >= ngrp);
  assign iq_pop   = issue && last_grp;
  assign li_pop   = (wb_act || wb_start) && (grp + 8'd1 >= wb_ngrp);

  // memory command
  always_comb begin
    cmd        = '0;
    cmd.store  = m_store;
    cmd.mode   = m_index ? AM_INDEX : m_stride ? AM_STRIDE : AM_UNIT;
    cmd.size   = msize_e'(iq_instr[31:30]);
    cmd.sext   = mf inside {M_LD, M_LDS, M_LDX};
    cmd.base   = vbase[iq_instr[17:15]];
    cmd.stride = vstride[iq_instr[20:18]];
    cmd.vl     = vl;
  end
  assign cmd_push = issue && is_mem && grp == 0;
  assign li_push  = cmd_push && !m_store;
  assign inc_en   = cmd_push;
  assign inc_base = iq_instr[17:15];
  assign inc_sel  = iq_instr[14:12];

  assign cr_we    = issue && is_ctrl && cf == C_MSTC;
  assign cr_waddr = iq_instr[17:12];
  assign cr_raddr = iq_instr[17:12];
  assign vl_set   = issue && is_arith && vf == F_CCZACC;

  // scalar results
  always_comb begin
    sres_push = 1'b0;
    sres_data = '0;
    if (u_x.valid && u_x.kind == U_EXT) begin
      sres_push = 1'b1;
      sres_data = ext_data;
    end else if (issue && is_ctrl && cf == C_MCTS) begin
      sres_push = 1'b1;
      sres_data = cr_rdata;
    end
  end

  assign mac_en    = u_x.valid && u_x.kind == U_MAC;
  assign mac_clear = u_x.valid && u_x.kind == U_CCZ;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      u_o     <= '0;
      u_x     <= '0;
      u_w     <= '0;
      grp     <= '0;
      wb_act  <= 1'b0;
      wb_cnt  <= '0;
      pend_ld <= '0;
    end else begin
      u_o <= u_r;
      u_x <= u_o;
      u_w <= u_x;
      if (wb_act || wb_start) begin
        if (li_pop) begin
          grp    <= '0;
          wb_act <= 1'b0;
        end else begin
          grp    <= grp + 8'd1;
          wb_act <= 1'b1;
        end
      end else if (issue) begin
        grp <= last_grp ? 8'd0 : grp + 8'd1;
      end
      wb_cnt <= wb_cnt + (ld_done ? 3'd1 : 3'd0) - (li_pop ? 3'd1 : 3'd0);
      if (li_push) pend_ld[f_vd] <= 1'b1;
      if (li_pop)  pend_ld[li_head[5:0]] <= 1'b0;
    end
  end

  assign pipe_empty = !u_o.valid && !u_x.valid && !u_w.valid && !wb_act && wb_cnt == 0 && li_empty;
endmodule
