// tb_vipers_lane: lane 1 of a 4-lane machine (4 element slots per lane,
// 16-word shared local memory). The testbench plays the controller: it
// moves micro-ops through the R/O/X/W stage registers, one op at a time,
// and keeps a model of the lane's register and flag partition. Covers
// scalar insert (only the owning lane writes), masked and unmasked ALU,
// shift, multiply, compare and merge ops with partial VL, extract, load
// buffer write-back, store buffer data and index pushes, local memory
// write/read, MAC operand outputs, vcczacc write and the vupshift
// neighbour path. At the end every register is read back by extract.
module tb_vipers_lane;
  import vipers_pkg::*;
  localparam int LANE = 1, NLANE = 4, EPL = 4, NR = 12;
  logic clk = 0, rst_n = 0;
  uop_t u_r = '0, u_o = '0, u_x = '0, u_w = '0, nxt = '0;
  logic [31:0] rd_a, rd_b, nbr = 0, mac_a, mac_b, ccz_val = 0, ext_data, lb_wdata = 0, sb_data, sb_off;
  logic mac_act, lb_push = 0, lb_empty, sb_pop = 0, sb_empty;
  logic [3:0] sb_count;
  logic [31:0] rf [NR][EPL];
  logic        fl [2][EPL];
  logic [31:0] lm [16];
  int checks = 0, failures = 0;

  vipers_lane #(.LANE(LANE), .NLANE(NLANE), .VPW(32), .NVREG(64), .EPL(EPL), .LMEMN(16),
                .LMEMSHARE(1'b1), .VMULT(1'b1), .SBDEPTH(8)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin u_w <= u_x; u_x <= u_o; u_o <= u_r; u_r <= nxt; end

  initial begin
    #2000000;
    $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string s, logic [31:0] g, logic [31:0] e);
    checks++;
    if (g !== e) begin failures++; if (failures < 20) $display("FAIL %s got %h exp %h", s, g, e); end
  endtask

  function automatic uop_t mk(ukind_e k, vfunc_e f, int vd, int va, int vb, int s);
    uop_t u = '0;
    u.valid = 1; u.kind = k; u.func = f; u.vd = 6'(vd); u.va = 6'(va); u.vb = 6'(vb);
    u.slot = 8'(s); u.vl = 16'(NLANE * EPL);
    return u;
  endfunction

  // run one micro-op through the pipeline; returns the X-stage outputs
  logic [31:0] xs_ext, xs_maca, xs_macb, os_a, os_b;
  logic        xs_mac;
  task automatic run(uop_t u);
    @(negedge clk); nxt = u;
    @(negedge clk); nxt = '0;                  // u in R
    @(negedge clk); os_a = rd_a; os_b = rd_b;  // u in O
    @(negedge clk);                            // u in X
    xs_ext = ext_data; xs_mac = mac_act; xs_maca = mac_a; xs_macb = mac_b;
    @(negedge clk);                            // u in W
    @(negedge clk);                            // written
  endtask

  function automatic bit active(uop_t u);
    int el = u.slot * NLANE + LANE;
    if (u.kind == U_INS || u.kind == U_EXT) return el == u.vindex;
    return el < u.vl && (!u.mask || fl[u.msel][u.slot]);
  endfunction

  function automatic logic [31:0] alu(vfunc_e f, logic [31:0] a, logic [31:0] b, logic g);
    case (f)
      F_ADD: return a + b;  F_SUB: return a - b;  F_AND: return a & b;  F_XOR: return a ^ b;
      F_MAXU: return (a > b) ? a : b;  F_MIN: return ($signed(a) < $signed(b)) ? a : b;
      F_MERGE: return g ? a : b;  F_MOV: return a;
      F_SLL: return a << b[4:0];  F_SRA: return $signed(a) >>> b[4:0];
      F_MUL: return a * b;
      F_CMPEQ: return 32'(a == b);  F_CMPLT: return 32'($signed(a) < $signed(b));
      default: return 'x;
    endcase
  endfunction

  vfunc_e ops[13] = '{F_ADD, F_SUB, F_AND, F_XOR, F_MAXU, F_MIN, F_MERGE, F_MOV, F_SLL, F_SRA, F_MUL,
                      F_CMPEQ, F_CMPLT};

  initial begin
    uop_t u;
    for (int s = 0; s < EPL; s++) begin fl[0][s] = 1; fl[1][s] = 1; end
    #12 rst_n = 1;
    // insert: every register and slot, plus an insert aimed at another lane
    for (int r = 0; r < NR; r++)
      for (int s = 0; s < EPL; s++) begin
        u = mk(U_INS, F_MOV, r, 0, 0, s); u.wvreg = 1; u.scalar = $urandom;
        u.vindex = 16'(s * NLANE + LANE);
        run(u); rf[r][s] = u.scalar;
        u.vindex = 16'(s * NLANE + LANE + 1); u.scalar = ~u.scalar;
        run(u);
      end
    // ALU, shift, multiply, compare and merge, random VL and masks
    for (int t = 0; t < 400; t++) begin
      vfunc_e f;
      logic [31:0] a, b, r;
      f = ops[$urandom % 13];
      u = mk(U_ALU, f, 1 + $urandom % (NR - 1), $urandom % NR, $urandom % NR, $urandom % EPL);
      u.vs = ($urandom % 4 == 0); u.scalar = $urandom;
      u.vl = 16'($urandom % 17); u.mask = ($urandom % 3 == 0); u.msel = $urandom;
      if (f == F_MERGE) u.mask = 0;
      if (f inside {F_CMPEQ, F_CMPLT}) begin u.wflag = 1; u.vd = 6'($urandom % 2); end
      else u.wvreg = 1;
      if ((f == F_CMPEQ) && $urandom % 2) begin u.vb = u.va; u.scalar = rf[u.va][u.slot]; end
      a = rf[u.va][u.slot]; b = u.vs ? u.scalar : rf[u.vb][u.slot];
      r = alu(f, a, b, fl[u.msel][u.slot]);
      if (active(u)) begin
        if (u.wflag) fl[u.vd[0]][u.slot] = r[0];
        else rf[u.vd][u.slot] = r;
      end
      run(u);
      if (u.wvreg) begin
        int d, sl;
        d = u.vd; sl = u.slot;
        u = mk(U_EXT, F_MOV, 0, d, 0, sl); u.vindex = 16'(sl * NLANE + LANE);
        run(u); chk($sformatf("%s result", f.name()), xs_ext, rf[d][sl]);
      end
    end
    // extract: the element appears on ext_data in stage X
    for (int s = 0; s < EPL; s++) begin
      u = mk(U_EXT, F_MOV, 0, 5, 0, s); u.vindex = 16'(s * NLANE + LANE);
      run(u); chk("extract", xs_ext, rf[5][s]);
    end
    // load buffer write-back (VL 14 still covers this lane's element 13)
    for (int s = 0; s < EPL; s++) begin
      @(negedge clk); lb_push = 1; lb_wdata = $urandom; rf[7][s] = lb_wdata;
    end
    @(negedge clk); lb_push = 0;
    for (int s = 0; s < EPL; s++) begin
      u = mk(U_LDWB, F_MOV, 7, 0, 0, s); u.wvreg = 1; u.vl = 16'd14; run(u);
    end
    chk("load buffer empty", lb_empty, 1);
    // store buffer: data/index pairs, then index-only entries
    for (int s = 0; s < EPL; s++) begin u = mk(U_STRD, F_MOV, 0, 2, 3, s); run(u); end
    for (int s = 0; s < EPL; s++) begin u = mk(U_IDXRD, F_MOV, 0, 4, 0, s); run(u); end
    chk("store buffer count", sb_count, 8);
    for (int s = 0; s < EPL; s++) begin
      chk("store data", sb_data, rf[2][s]); chk("store index", sb_off, rf[3][s]);
      @(negedge clk); sb_pop = 1; @(negedge clk); sb_pop = 0;
    end
    for (int s = 0; s < EPL; s++) begin
      chk("index data", sb_data, 0); chk("index", sb_off, rf[4][s]);
      @(negedge clk); sb_pop = 1; @(negedge clk); sb_pop = 0;
    end
    chk("store buffer empty", sb_empty, 1);
    // local memory: addresses from register 8, data from register 9 or the scalar
    for (int s = 0; s < EPL; s++) begin
      rf[8][s] = 32'(4 * s + 3); u = mk(U_INS, F_MOV, 8, 0, 0, s); u.wvreg = 1;
      u.scalar = rf[8][s]; u.vindex = 16'(s * NLANE + LANE); run(u);
    end
    for (int s = 0; s < EPL; s++) begin
      u = mk(U_STL, F_MOV, 0, 8, 9, s); u.vs = (s == 2); u.scalar = 32'hC0FFEE00 + s;
      lm[rf[8][s]] = u.vs ? u.scalar : rf[9][s];
      run(u);
    end
    for (int s = 0; s < EPL; s++) begin
      u = mk(U_LDL, F_MOV, 10, 8, 0, s); u.wvreg = 1; run(u); rf[10][s] = lm[rf[8][s]];
    end
    // MAC operands leave in stage X, only for active elements
    for (int s = 0; s < EPL; s++) begin
      u = mk(U_MAC, F_MAC, 0, 1, 2, s); u.vl = 16'd10; run(u);
      chk("mac active", xs_mac, (s * NLANE + LANE) < 10);
      chk("mac a", xs_maca, rf[1][s]); chk("mac b", xs_macb, rf[2][s]);
    end
    // vcczacc result and vupshift neighbour
    ccz_val = 32'h1234_5678;
    u = mk(U_CCZ, F_CCZACC, 11, 0, 0, 0); u.wvreg = 1; run(u); rf[11][0] = ccz_val;
    for (int s = 0; s < EPL; s++) begin
      nbr = $urandom;
      u = mk(U_UPSH, F_UPSHIFT, 6, 4, 0, s); u.wvreg = 1; run(u);
      chk("upshift port a", os_a, rf[4][s]);
      if (s < EPL - 1) chk("upshift port b", os_b, rf[4][s + 1]);
      rf[6][s] = nbr;
    end
    // read every register back
    for (int r = 0; r < NR; r++)
      for (int s = 0; s < EPL; s++) begin
        u = mk(U_EXT, F_MOV, 0, r, 0, s); u.vindex = 16'(s * NLANE + LANE);
        run(u); chk($sformatf("register %0d slot %0d", r, s), xs_ext, rf[r][s]);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
