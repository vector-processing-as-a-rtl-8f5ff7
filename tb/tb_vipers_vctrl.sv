// tb_vipers_vctrl: the vector controller on its own (16 lanes, MVL 64, one
// MAC chain). Instructions come from a testbench queue; every micro-op
// leaving stage R is logged with its cycle. Checks: splitting into
// ceil(VL/16) element groups on consecutive cycles, RAW interlock timing
// (two lost cycles behind a two-group producer, none behind a four-group
// one, flag dependences), control register write/read, vbase
// auto-increment and memory command contents, load write-back insertion
// and the load interlock, store-buffer and result-queue back-pressure,
// extract/insert element selection, MAC enable/clear and the VL change
// made by vcczacc.
module tb_vipers_vctrl;
  import vipers_pkg::*;
  import vipers_asm_pkg::*;
  logic clk = 0, rst_n = 0;
  logic iq_empty, iq_pop;
  logic [31:0] iq_instr, iq_scalar;
  uop_t u_r, u_o, u_x, u_w;
  logic cmd_push, cmd_full = 0, ld_done = 0, sres_push, sres_full = 0;
  memcmd_t cmd;
  logic [3:0] sb_count0 = 0;
  logic [31:0] sres_data, ext_data = 32'hE0E0_0000;
  logic mac_en, mac_clear, raw_stall, ld_stall, pipe_empty;

  logic [63:0] iq[$];
  uop_t rec_u[$];  int rec_c[$];
  memcmd_t cmds[$]; logic [31:0] sres[$];
  int cyc = 0, n_raw = 0, n_ld = 0, n_mac = 0, n_clr = 0;
  int checks = 0, failures = 0;

  vipers_vctrl #(.NLANE(16), .MVL(64), .NCHAIN(1), .SBDEPTH(8)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #500000;
    $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void refresh();
    iq_empty = (iq.size() == 0);
    {iq_scalar, iq_instr} = iq_empty ? 64'd0 : iq[0];
  endfunction

  always @(posedge clk) begin
    logic pop;
    pop = iq_pop;
    if (u_r.valid) begin rec_u.push_back(u_r); rec_c.push_back(cyc); end
    if (cmd_push) cmds.push_back(cmd);
    if (sres_push) sres.push_back(sres_data);
    n_raw += raw_stall; n_ld += ld_stall; n_mac += mac_en; n_clr += mac_clear;
    cyc++;
    #1;
    if (pop) void'(iq.pop_front());
    refresh();
  end

  task automatic chk(string s, logic [31:0] g, logic [31:0] e);
    checks++;
    if (g !== e) begin failures++; if (failures < 20) $display("FAIL %s got %0h exp %0h", s, g, e); end
  endtask

  task automatic send(logic [31:0] ins, logic [31:0] sc = 0);
    @(negedge clk); iq.push_back({sc, ins}); refresh();
  endtask

  task automatic idle();
    do @(negedge clk); while (!iq_empty || !pipe_empty);
  endtask

  task automatic clear_logs();
    rec_u.delete(); rec_c.delete(); cmds.delete(); sres.delete();
    n_raw = 0; n_ld = 0; n_mac = 0; n_clr = 0;
  endtask

  // next n logged micro-ops must be kind k on register vd, slots 0..n-1 on
  // consecutive cycles; returns the cycle of the first
  task automatic expect_ops(string s, ukind_e k, int vd, int n, output int c0);
    c0 = -1;
    for (int i = 0; i < n; i++) begin
      uop_t u; int c;
      checks++;
      if (rec_u.size() == 0) begin failures++; $display("FAIL %s: missing op %0d", s, i); return; end
      u = rec_u.pop_front(); c = rec_c.pop_front();
      if (i == 0) c0 = c;
      if (u.kind != k || u.vd != 6'(vd) || u.slot != 8'(i) || c != c0 + i) begin
        failures++;
        if (failures < 20) $display("FAIL %s: op %0d kind %s vd %0d slot %0d cycle %0d", s, i, u.kind.name(), u.vd, u.slot, c - c0);
      end
    end
  endtask

  initial begin
    int c1, c2;
    refresh();
    #12 rst_n = 1;

    // VL and a four-group instruction
    send(vctrl(C_MCTS, 0, CR_VL)); idle();
    chk("reset VL", sres[0], 64);
    clear_logs();
    send(varith(F_ADD, 1, 2, 3)); idle();
    expect_ops("vadd VL 64", U_ALU, 1, 4, c1);
    chk("no extra ops", rec_u.size(), 0);

    // dependence behind a four-group producer: no stall
    clear_logs();
    send(varith(F_ADD, 5, 6, 7)); send(varith(F_SUB, 8, 5, 5)); idle();
    expect_ops("producer 4", U_ALU, 5, 4, c1); expect_ops("consumer 4", U_ALU, 8, 4, c2);
    chk("consumer follows 4-group producer directly", c2 - c1, 4);
    chk("no RAW stall", n_raw, 0);

    // VL 32: dependent instruction loses two cycles
    send(vctrl(C_MSTC, 0, CR_VL), 32);
    clear_logs();
    send(varith(F_ADD, 5, 6, 7)); send(varith(F_SUB, 8, 5, 5)); idle();
    expect_ops("producer 2", U_ALU, 5, 2, c1); expect_ops("consumer 2", U_ALU, 8, 2, c2);
    chk("consumer trails 2-group producer by four cycles", c2 - c1, 4);
    chk("two RAW stall cycles", n_raw, 2);
    clear_logs();
    send(varith(F_ADD, 5, 6, 7)); send(varith(F_MOV, 9, 5, 0)); idle();
    expect_ops("producer 2", U_ALU, 5, 2, c1); expect_ops("single-operand consumer", U_ALU, 9, 2, c2);
    chk("single-operand consumer trails by four cycles", c2 - c1, 4);
    clear_logs();
    send(varith(F_ADD, 5, 6, 7)); send(varith(F_ADD, 9, 1, 5)); idle();
    expect_ops("producer 2", U_ALU, 5, 2, c1); expect_ops("operand-B consumer", U_ALU, 9, 2, c2);
    chk("operand-B consumer trails by four cycles", c2 - c1, 4);

    // VL beyond MVL is clamped; VL 5 is one group
    send(vctrl(C_MSTC, 0, CR_VL), 100); send(vctrl(C_MCTS, 0, CR_VL)); idle();
    chk("VL clamped", sres[$], 64);
    send(vctrl(C_MSTC, 0, CR_VL), 5);
    clear_logs();
    // compare then masked op: waits for the flag
    send(varith(F_CMPLT, 0, 1, 2)); send(varith(F_ADD, 9, 1, 1, 0, 1)); idle();
    expect_ops("compare", U_ALU, 0, 1, c1); expect_ops("masked", U_ALU, 9, 1, c2);
    chk("masked op waits for flag", c2 - c1, 4);

    // memory command: vbase1 = 0x100, vinc2 = 0x40, vstride3 = 3
    send(vctrl(C_MSTC, 0, CR_VL), 64);
    send(vctrl(C_MSTC, 0, CR_VBASE + 1), 32'h100);
    send(vctrl(C_MSTC, 0, CR_VINC + 2), 32'h40);
    send(vctrl(C_MSTC, 0, CR_VSTRIDE + 3), 3);
    clear_logs();
    send(vmem(M_LDS, 1, 10, 3, 1, 2));
    send(varith(F_ADD, 11, 10, 1));            // must wait for the load
    repeat (12) @(negedge clk);
    chk("load command queued", cmds.size(), 1);
    chk("cmd base", cmds[0].base, 32'h100);
    chk("cmd stride", cmds[0].stride, 3);
    chk("cmd mode", cmds[0].mode, AM_STRIDE);
    chk("cmd size", cmds[0].size, SZ_H);
    chk("cmd sext", cmds[0].sext, 1);
    chk("cmd store", cmds[0].store, 0);
    chk("no op before write-back", rec_u.size(), 0);
    chk("load interlock", n_ld > 8, 1);
    @(negedge clk); ld_done = 1; @(negedge clk); ld_done = 0;
    idle();
    expect_ops("load write-back", U_LDWB, 10, 4, c1);
    expect_ops("dependent add", U_ALU, 11, 4, c2);
    chk("add after write-back", c2 - c1 >= 4, 1);
    send(vctrl(C_MCTS, 0, CR_VBASE + 1)); idle();
    chk("vbase incremented", sres[$], 32'h140);

    // store with a nearly full store buffer waits; indexed store reads two registers
    clear_logs();
    sb_count0 = 5;
    send(vmem(M_STX, 2, 12, 13, 1, 0));
    repeat (6) @(negedge clk);
    chk("store held by store buffer", rec_u.size(), 0);
    sb_count0 = 0;
    idle();
    chk("store command", cmds.size(), 1);
    chk("store cmd mode", cmds[0].mode, AM_INDEX);
    chk("store cmd store", cmds[0].store, 1);
    for (int i = 0; i < 4; i++) begin
      chk("store op", rec_u[i].kind, U_STRD);
      chk("store data reg", rec_u[i].va, 12);
      chk("store index reg", rec_u[i].vb, 13);
    end
    // indexed load: index register copied first
    clear_logs();
    send(vmem(M_LDXU, 2, 14, 15, 1, 0)); repeat (8) @(negedge clk);
    chk("index ops", rec_u.size(), 4);
    chk("index op kind", rec_u[0].kind, U_IDXRD);
    chk("index op reg", rec_u[0].va, 15);
    chk("indexed load cmd", cmds[0].mode, AM_INDEX);
    chk("unsigned", cmds[0].sext, 0);
    @(negedge clk); ld_done = 1; @(negedge clk); ld_done = 0;
    idle();

    // extract and insert pick element VINDEX = 37: slot 2
    clear_logs();
    send(vctrl(C_MSTC, 0, CR_VINDEX), 37);
    send(vctrl(C_EXTVS, 3, 0));
    send(vctrl(C_INSVS, 4, 0), 32'h77);
    idle();
    chk("ext op", rec_u[0].kind, U_EXT);
    chk("ext slot", rec_u[0].slot, 2);
    chk("ext reg", rec_u[0].va, 3);
    chk("ext result", sres[0], 32'hE0E0_0000);
    chk("ins op", rec_u[1].kind, U_INS);
    chk("ins slot", rec_u[1].slot, 2);
    chk("ins scalar", rec_u[1].scalar, 32'h77);
    chk("ins vindex", rec_u[1].vindex, 37);

    // full result queue holds vmcts back
    clear_logs();
    sres_full = 1;
    send(vctrl(C_MCTS, 0, CR_VINDEX));
    repeat (5) @(negedge clk);
    chk("held by full result queue", sres.size(), 0);
    sres_full = 0; idle();
    chk("vmcts after release", sres[0], 37);

    // MAC: four enabled cycles, vcczacc clears and sets VL to one chain
    clear_logs();
    send(varith(F_MAC, 0, 1, 2)); send(varith(F_CCZACC, 20, 0, 0)); send(vctrl(C_MCTS, 0, CR_VL));
    idle();
    chk("mac enable cycles", n_mac, 4);
    chk("accumulator clear", n_clr, 1);
    chk("vcczacc op", rec_u[4].kind, U_CCZ);
    chk("vcczacc dest", rec_u[4].vd, 20);
    chk("VL after vcczacc", sres[0], 1);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
