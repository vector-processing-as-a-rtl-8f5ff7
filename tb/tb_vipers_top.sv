// tb_vipers_top: end-to-end test of the vector processor at its default
// (sixteen-lane) configuration.
//
// The testbench plays the scalar core: it writes operand vectors into main
// memory through the scalar data port, issues vector instructions with
// their scalar operands, reads results back through the scalar port or the
// scalar result queue, and compares them with values it computes itself.
// Covered: unit-stride, strided and indexed loads and stores of words, half
// words and bytes; the ALU, shifter and multiplier; compares, masked
// execution and merge; vmac/vcczacc; vupshift; vldl/vstl; vins/vext and
// vmcts. It also checks cycle counts that the architecture states: an
// element-group count of ceil(VL/NLANE) per arithmetic instruction, 16
// words per memory cycle... (4 words per line for unit stride, 2 for stride
// 2, 4 bytes per cycle for byte stores) and the two-cycle stall of a
// dependent instruction behind a two-group producer. Every mechanism must
// occur at least once.
module tb_vipers_top;
  import vipers_pkg::*;
  import vipers_asm_pkg::*;

  localparam int NLANE = 16;
  localparam int MVL   = 64;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        instr_valid = 1'b0, instr_ready;
  logic [31:0] instr = '0, instr_scalar = '0;
  logic        sres_valid, sres_ready = 1'b0;
  logic [31:0] sres_data;
  logic        smem_req = 1'b0, smem_we = 1'b0, smem_gnt, smem_rvalid;
  logic [1:0]  smem_size = 2'd2;
  logic [31:0] smem_addr = '0, smem_wdata = '0, smem_rdata;
  logic        idle;

  vipers_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (400000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- mechanism counters
  int n_raw = 0, n_ldst = 0, n_ldwb = 0, n_mac = 0, n_ccz = 0, n_upsh = 0, n_lmem = 0,
      n_idx = 0, n_str = 0, n_mask = 0, n_ext = 0, n_sport = 0, n_multi = 0, n_sbfull = 0;
  int n_fire = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.raw_stall) n_raw++;
    if (dut.ld_stall)  n_ldst++;
    if (dut.u_x.valid && dut.u_x.kind == U_LDWB) n_ldwb++;
    if (dut.mac_en)    n_mac++;
    if (dut.mac_clear) n_ccz++;
    if (dut.u_x.valid && dut.u_x.kind == U_UPSH) n_upsh++;
    if (dut.u_x.valid && (dut.u_x.kind == U_LDL || dut.u_x.kind == U_STL)) n_lmem++;
    if (dut.u_mu.act && dut.u_mu.c.mode == AM_INDEX && dut.u_mu.fire) n_idx++;
    if (dut.u_mu.act && dut.u_mu.c.mode == AM_STRIDE && dut.u_mu.fire) n_str++;
    if (dut.u_x.valid && dut.u_x.mask) n_mask++;
    if (dut.u_x.valid && dut.u_x.kind == U_EXT) n_ext++;
    if (smem_gnt) n_sport++;
    if (dut.u_mu.fire && dut.u_mu.k > 1) n_multi++;
    if (!dut.u_vctrl.iq_empty && !dut.u_vctrl.issue && !dut.u_vctrl.wb_act &&
        !dut.u_vctrl.wb_start && dut.u_vctrl.haz_struct) n_sbfull++;
    if (dut.u_mu.fire) n_fire++;
  end

  // ---------------- scalar-core side tasks
  // Inputs are driven just after the falling edge; handshake outputs are
  // looked at there too, so a request seen granted at a falling edge is
  // taken by the design at the next rising edge.
  task automatic send(input logic [31:0] ins, input logic [31:0] sc = 0);
    @(negedge clk);
    instr = ins; instr_scalar = sc; instr_valid = 1'b1;
    while (!instr_ready) @(negedge clk);
    @(negedge clk);
    instr_valid = 1'b0;
  endtask

  task automatic get_res(output logic [31:0] d);
    @(negedge clk);
    while (!sres_valid) @(negedge clk);
    d = sres_data;
    sres_ready = 1'b1;
    @(negedge clk);
    sres_ready = 1'b0;
  endtask

  task automatic wait_idle();
    @(negedge clk);
    while (!idle) @(negedge clk);
  endtask

  task automatic swrite(input logic [31:0] a, input logic [31:0] d, input int sz = 2);
    @(negedge clk);
    smem_req = 1'b1; smem_we = 1'b1; smem_addr = a; smem_wdata = d; smem_size = 2'(sz);
    while (!smem_gnt) @(negedge clk);
    @(negedge clk);
    smem_req = 1'b0; smem_we = 1'b0;
  endtask

  task automatic sread(input logic [31:0] a, output logic [31:0] d, input int sz = 2);
    @(negedge clk);
    smem_req = 1'b1; smem_we = 1'b0; smem_addr = a; smem_size = 2'(sz);
    while (!smem_gnt) @(negedge clk);
    @(negedge clk);
    smem_req = 1'b0;
    while (!smem_rvalid) @(negedge clk);
    d = smem_rdata;
  endtask

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic setcr(input int cr, input logic [31:0] v);
    send(vctrl(C_MSTC, 0, cr), v);
  endtask

  // read VL words from memory and compare with exp[]
  task automatic check_words(input string what, input logic [31:0] a, input int n,
                             input logic [31:0] exp [MVL]);
    logic [31:0] d;
    for (int i = 0; i < n; i++) begin
      sread(a + 4*i, d);
      check($sformatf("%s[%0d]", what, i), d, exp[i]);
    end
  endtask

  // ---------------- test data
  logic [31:0] A [MVL], B [MVL], E [MVL], T [MVL];
  logic [31:0] d;
  longint t0, t1;
  int f0;

  localparam logic [31:0] AA = 32'h0000_0000, BB = 32'h0000_0100, OUT = 32'h0000_1000,
                          IDX = 32'h0000_0200, BYT = 32'h0000_0400;

  function automatic logic [31:0] absdiff(logic [31:0] a, logic [31:0] b);
    return ($signed(a) < $signed(b)) ? b - a : a - b;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);

    // operands
    for (int i = 0; i < MVL; i++) begin
      A[i] = $urandom;
      B[i] = $urandom;
      if (i % 5 == 0) B[i] = A[i];
      swrite(AA + 4*i, A[i]);
      swrite(BB + 4*i, B[i]);
    end
    // an index vector: byte offsets of a permutation of the A words
    for (int i = 0; i < MVL; i++) swrite(IDX + 4*i, 4 * ((i * 37 + 11) % MVL));
    // bytes 0..63 with varied signs
    for (int i = 0; i < MVL; i += 4)
      swrite(BYT + i, {8'(i*29+3+128), 8'(i*29+2), 8'(i*29+1+128), 8'(i*29)});

    setcr(CR_VBASE + 0, AA);
    setcr(CR_VBASE + 1, BB);
    setcr(CR_VBASE + 2, OUT);
    setcr(CR_VBASE + 3, IDX);
    setcr(CR_VBASE + 4, BYT);
    setcr(CR_VINC + 1, 32'd4);
    setcr(CR_VSTRIDE + 4, 32'd2);

    // ---- 1. unit-stride loads, arithmetic, store (VL = 64)
    send(vmem(M_LD, 2, 1, 0, 0, 0));
    send(vmem(M_LD, 2, 2, 0, 1, 1));
    send(varith(F_ADD, 3, 1, 2));           // waits for both loads
    send(varith(F_SUB, 4, 1, 2));
    send(varith(F_ABSDIFF, 5, 1, 2));
    send(varith(F_MAX, 6, 1, 2));
    send(varith(F_MINU, 7, 1, 2));
    send(varith(F_MUL, 8, 1, 2));
    send(varith(F_XOR, 9, 1, 2));
    send(vmem(M_ST, 2, 3, 0, 2, 0));
    wait_idle();
    for (int i = 0; i < MVL; i++) E[i] = A[i] + B[i];
    check_words("vadd", OUT, MVL, E);
    // vbase1 auto-incremented by vinc1 = 4
    send(vctrl(C_MCTS, 0, CR_VBASE + 1));
    get_res(d);
    check("auto-increment", d, BB + 4);
    setcr(CR_VBASE + 1, BB);

    send(vmem(M_ST, 2, 4, 0, 2, 0)); wait_idle();
    for (int i = 0; i < MVL; i++) E[i] = A[i] - B[i];
    check_words("vsub", OUT, MVL, E);
    send(vmem(M_ST, 2, 5, 0, 2, 0)); wait_idle();
    for (int i = 0; i < MVL; i++) E[i] = absdiff(A[i], B[i]);
    check_words("vabsdiff", OUT, MVL, E);
    send(vmem(M_ST, 2, 6, 0, 2, 0)); wait_idle();
    for (int i = 0; i < MVL; i++) E[i] = ($signed(A[i]) > $signed(B[i])) ? A[i] : B[i];
    check_words("vmax", OUT, MVL, E);
    send(vmem(M_ST, 2, 7, 0, 2, 0)); wait_idle();
    for (int i = 0; i < MVL; i++) E[i] = (A[i] < B[i]) ? A[i] : B[i];
    check_words("vminu", OUT, MVL, E);
    send(vmem(M_ST, 2, 8, 0, 2, 0)); wait_idle();
    for (int i = 0; i < MVL; i++) E[i] = A[i] * B[i];
    check_words("vmul", OUT, MVL, E);

    // ---- 2. extract / insert / vector-scalar
    send(varith(F_ADD, 10, 9, 0, 1'b1), 32'd7);   // v10 = v9 + 7
    for (int k = 0; k < 3; k++) begin
      int idx;
      idx = (k == 0) ? 0 : (k == 1) ? 17 : 63;
      setcr(CR_VINDEX, idx);
      send(vctrl(C_EXTVS, 10, 0));
      get_res(d);
      check($sformatf("vext v10[%0d]", idx), d, (A[idx] ^ B[idx]) + 7);
    end
    setcr(CR_VINDEX, 21);
    send(vctrl(C_INSVS, 10, 0), 32'hCAFE_F00D);
    send(vctrl(C_EXTVS, 10, 0));
    get_res(d);
    check("vins/vext", d, 32'hCAFE_F00D);
    setcr(CR_VINDEX, 20);
    send(vctrl(C_EXTVS, 10, 0));
    get_res(d);
    check("vins neighbour untouched", d, (A[20] ^ B[20]) + 7);

    // ---- 3. shifts with a scalar amount
    send(varith(F_SRA, 11, 1, 0, 1'b1), 32'd5);
    send(varith(F_ROT, 12, 1, 0, 1'b1), 32'd8);
    send(vmem(M_ST, 2, 11, 0, 2, 0)); wait_idle();
    for (int i = 0; i < MVL; i++) E[i] = $signed(A[i]) >>> 5;
    check_words("vsra", OUT, MVL, E);
    send(vmem(M_ST, 2, 12, 0, 2, 0)); wait_idle();
    for (int i = 0; i < MVL; i++) E[i] = (A[i] >> 8) | (A[i] << 24);
    check_words("vrot", OUT, MVL, E);

    // ---- 4. compare, masked add, merge
    send(varith(F_CMPLT, 0, 1, 2));               // flag0 = A < B (signed)
    send(varith(F_MOV, 13, 1, 0));
    send(varith(F_ADD, 13, 1, 0, 1'b1, 1'b1), 32'd1000);   // masked: v13 = A + 1000 where flag
    send(vmem(M_ST, 2, 13, 0, 2, 0)); wait_idle();
    for (int i = 0; i < MVL; i++) E[i] = ($signed(A[i]) < $signed(B[i])) ? A[i] + 1000 : A[i];
    check_words("masked vadd", OUT, MVL, E);
    send(varith(F_MERGE, 14, 1, 2));
    send(vmem(M_ST, 2, 14, 0, 2, 0)); wait_idle();
    for (int i = 0; i < MVL; i++) E[i] = ($signed(A[i]) < $signed(B[i])) ? A[i] : B[i];
    check_words("vmerge", OUT, MVL, E);

    // ---- 5. vmac / vcczacc: dot product over VL = 64, chain over all lanes
    send(varith(F_MAC, 0, 1, 2));
    send(varith(F_CCZACC, 15, 0, 0));
    setcr(CR_VINDEX, 0);
    send(vctrl(C_EXTVS, 15, 0));
    get_res(d);
    begin
      logic [31:0] s;
      s = 0;
      for (int i = 0; i < MVL; i++) s += A[i] * B[i];
      check("vmac/vcczacc dot product", d, s);
    end
    send(vctrl(C_MCTS, 0, CR_VL));
    get_res(d);
    check("vcczacc sets VL", d, 32'd1);
    // accumulators were cleared: a second pair over 3 elements
    setcr(CR_VL, 3);
    send(varith(F_MAC, 0, 1, 2));
    send(varith(F_CCZACC, 15, 0, 0));
    send(vctrl(C_EXTVS, 15, 0));
    get_res(d);
    check("vcczacc cleared accumulators", d, A[0]*B[0] + A[1]*B[1] + A[2]*B[2]);
    setcr(CR_VL, MVL);

    // ---- 6. vupshift
    send(varith(F_UPSHIFT, 16, 1, 0));
    send(vmem(M_ST, 2, 16, 0, 2, 0)); wait_idle();
    for (int i = 0; i < MVL; i++) E[i] = A[(i + 1) % MVL];
    check_words("vupshift", OUT, MVL, E);
    setcr(CR_VL, 40);
    send(varith(F_UPSHIFT, 16, 1, 0));
    setcr(CR_VL, MVL);
    send(vmem(M_ST, 2, 16, 0, 2, 0)); wait_idle();
    for (int i = 0; i < MVL; i++) E[i] = (i < 40) ? A[(i + 1) % 40] : A[(i + 1) % MVL];
    check_words("vupshift VL=40", OUT, MVL, E);

    // ---- 7. local memory: table[j] = 3*j+1, looked up by A[i] % 256
    send(varith(F_AND, 17, 1, 0, 1'b1), 32'hFF);       // index = A & 255
    for (int i = 0; i < MVL; i++) T[i] = 32'(i);
    // write the table with an index vector 0..63 + k*64, data = 3*idx+1
    for (int i = 0; i < MVL; i++) swrite(OUT + 4*i, i);
    send(vmem(M_LD, 2, 18, 0, 2, 0));                  // v18 = 0..63
    for (int k = 0; k < 4; k++) begin
      send(varith(F_ADD, 19, 18, 0, 1'b1), 32'(64*k));   // v19 = i + 64k
      send(varith(F_MUL, 20, 19, 0, 1'b1), 32'd3);
      send(varith(F_ADD, 20, 20, 0, 1'b1), 32'd1);
      // each lane writes every table entry: elements of lane L cover
      // all indices congruent to L, so repeat over all rotations
      for (int r = 0; r < NLANE; r++) begin
        send(varith(F_STL, 0, 19, 20));
        send(varith(F_UPSHIFT, 19, 19, 0));
        send(varith(F_UPSHIFT, 20, 20, 0));
      end
    end
    send(varith(F_LDL, 21, 17, 0));
    send(vmem(M_ST, 2, 21, 0, 2, 0)); wait_idle();
    for (int i = 0; i < MVL; i++) E[i] = 3 * (A[i] & 32'hFF) + 1;
    check_words("vldl table lookup", OUT, MVL, E);

    // ---- 8. strided load (stride 2 words), timing
    send(vmem(M_LDS, 2, 22, 4, 0, 0));
    t0 = longint'(n_fire);
    wait_idle();
    t1 = longint'(n_fire);
    check("stride-2 load memory cycles (VL/2)", 32'(t1 - t0), 32'(MVL/2));
    send(vmem(M_ST, 2, 22, 0, 2, 0)); wait_idle();
    for (int i = 0; i < MVL; i++) E[i] = (i < MVL/2) ? A[2*i] : B[2*i - MVL];
    check_words("vlds stride 2", OUT, MVL, E);

    // unit-stride word load: 4 words per memory cycle
    t0 = longint'(n_fire);
    send(vmem(M_LD, 2, 23, 0, 0, 0)); wait_idle();
    check("unit-stride load memory cycles (VL/4)", 32'(n_fire - t0), 32'(MVL/4));

    // ---- 9. indexed load and store
    send(vmem(M_LD, 2, 24, 0, 3, 0));                  // v24 = offsets
    send(vmem(M_LDX, 2, 25, 24, 0, 0));                // v25[i] = A[perm(i)]
    send(vmem(M_ST, 2, 25, 0, 2, 0)); wait_idle();
    for (int i = 0; i < MVL; i++) E[i] = A[(i * 37 + 11) % MVL];
    check_words("indexed load", OUT, MVL, E);
    send(vmem(M_STX, 2, 2, 24, 2, 0)); wait_idle();    // OUT[perm(i)] = B[i]
    for (int i = 0; i < MVL; i++) E[(i * 37 + 11) % MVL] = B[i];
    check_words("indexed store", OUT, MVL, E);

    // ---- 10. bytes: signed and unsigned loads, byte store timing
    send(vmem(M_LD, 0, 26, 0, 4, 0));
    send(vmem(M_LDU, 0, 27, 0, 4, 0));
    send(varith(F_ADD, 28, 26, 27));
    send(vmem(M_ST, 2, 28, 0, 2, 0)); wait_idle();
    for (int i = 0; i < MVL; i++) begin
      logic [7:0] bv;
      bv = (i % 2 == 1) ? 8'((i - 1) / 4 * 4 * 29 + (i % 4) + 128) : 8'((i / 4) * 4 * 29 + (i % 4));
      bv = (i % 4 == 0) ? 8'((i/4)*4*29) : (i % 4 == 1) ? 8'((i/4)*4*29+1+128) :
           (i % 4 == 2) ? 8'((i/4)*4*29+2) : 8'((i/4)*4*29+3+128);
      E[i] = 32'($signed(bv)) + 32'(bv);
    end
    check_words("byte loads", OUT, MVL, E);
    t0 = longint'(n_fire);
    send(vmem(M_ST, 0, 1, 0, 2, 0)); wait_idle();       // byte store of A
    check("byte store memory cycles (4 per cycle)", 32'(n_fire - t0), 32'(MVL/4));
    for (int i = 0; i < MVL; i += 4) begin
      sread(OUT + i, d);
      check($sformatf("byte store %0d", i), d, {A[i+3][7:0], A[i+2][7:0], A[i+1][7:0], A[i][7:0]});
    end
    // halfword store then signed halfword load
    send(vmem(M_ST, 1, 2, 0, 2, 0));
    send(vmem(M_LD, 1, 29, 0, 2, 0));
    send(vmem(M_ST, 2, 29, 0, 2, 0)); wait_idle();
    for (int i = 0; i < MVL; i++) E[i] = 32'($signed(B[i][15:0]));
    check_words("halfword store/load", OUT, MVL, E);

    // ---- 11. element-group timing and RAW interlock
    // 64 elements on 16 lanes: 4 issue cycles per instruction
    wait_idle();
    t0 = cyc;
    send(varith(F_ADD, 30, 1, 2));
    send(varith(F_ADD, 31, 1, 2));
    send(varith(F_ADD, 32, 1, 2));
    wait_idle();
    t1 = cyc;
    // three independent 4-group instructions: 12 issue cycles + pipeline
    checks++;
    if (t1 - t0 > 12 + 8) begin
      failures++; $display("FAIL vector-vector throughput: %0d cycles", t1 - t0);
    end
    // two-group producer followed by a dependent op: 2 stall cycles
    setcr(CR_VL, 32);
    wait_idle();
    f0 = n_raw;
    send(varith(F_ABSDIFF, 33, 1, 2));
    send(varith(F_ADD, 34, 34, 33));
    wait_idle();
    check("RAW stall behind a 2-group producer", 32'(n_raw - f0), 32'd2);
    // four groups: no stall
    setcr(CR_VL, MVL);
    wait_idle();
    f0 = n_raw;
    send(varith(F_ABSDIFF, 33, 1, 2));
    send(varith(F_ADD, 34, 1, 33));
    wait_idle();
    check("no RAW stall behind a 4-group producer", 32'(n_raw - f0), 32'd0);
    send(vmem(M_ST, 2, 34, 0, 2, 0)); wait_idle();
    for (int i = 0; i < MVL; i++) E[i] = A[i] + absdiff(A[i], B[i]);
    check_words("dependent result", OUT, MVL, E);

    // ---- 12. back-to-back stores fill the store buffers
    for (int r = 0; r < 4; r++) send(vmem(M_ST, 2, 1, 0, 2, 0));
    wait_idle();

    // ---- mechanisms
    check("mechanism: RAW interlock stall",   32'(n_raw  > 0), 1);
    check("mechanism: pending-load stall",    32'(n_ldst > 0), 1);
    check("mechanism: load write-back",       32'(n_ldwb > 0), 1);
    check("mechanism: vmac",                  32'(n_mac  > 0), 1);
    check("mechanism: vcczacc",               32'(n_ccz  > 0), 1);
    check("mechanism: shift chain",           32'(n_upsh > 0), 1);
    check("mechanism: local memory",          32'(n_lmem > 0), 1);
    check("mechanism: indexed access",        32'(n_idx  > 0), 1);
    check("mechanism: strided access",        32'(n_str  > 0), 1);
    check("mechanism: masked execution",      32'(n_mask > 0), 1);
    check("mechanism: vext to scalar",        32'(n_ext  > 0), 1);
    check("mechanism: scalar memory port",    32'(n_sport > 0), 1);
    check("mechanism: multi-element access",  32'(n_multi > 0), 1);
    check("mechanism: structural stall",      32'(n_sbfull > 0), 1);
    $display("events: raw=%0d ldstall=%0d ldwb=%0d mac=%0d ccz=%0d upsh=%0d lmem=%0d idx=%0d str=%0d mask=%0d ext=%0d sport=%0d multi=%0d struct=%0d",
             n_raw, n_ldst, n_ldwb, n_mac, n_ccz, n_upsh, n_lmem, n_idx, n_str, n_mask, n_ext, n_sport, n_multi, n_sbfull);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
