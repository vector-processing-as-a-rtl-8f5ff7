// tb_vipers_memunit: the memory unit with a 256-line main memory. The lanes'
// store buffers and load buffers are modelled by queues in the testbench.
// Covers scalar reads and writes of every size, unit-stride, strided and
// indexed loads (signed/unsigned, unaligned) and stores of every size, the
// number of memory cycles each access takes (VL/4 for unit-stride words,
// one per element for indexed), the rule that a load waits for empty load
// buffers, and finally the whole memory against a byte-level model.
module tb_vipers_memunit;
  import vipers_pkg::*;
  localparam int NLANE = 16, DEPTH = 256, NB = DEPTH * 16;
  logic clk = 0, rst_n = 0;
  logic cmd_valid = 0, cmd_pop;
  memcmd_t cmd = '0;
  logic [NLANE-1:0] sb_empty, sb_pop, lb_push;
  logic [NLANE-1:0][31:0] sb_data, sb_off, lb_data;
  logic lb_empty_all, ld_done, busy;
  logic s_req = 0, s_we = 0, s_gnt, s_rvalid;
  msize_e s_size = SZ_W;
  logic [31:0] s_addr = 0, s_wdata = 0, s_rdata;
  logic [7:0] mem_addr;
  logic mem_we;
  logic [15:0] mem_uen;
  logic [127:0] mem_wdata, mem_rdata;

  logic [7:0]  bm [NB];                // byte model of the memory
  bit          bw [NB];                // byte has been written
  logic [63:0] sbq [NLANE][$];         // store buffers {offset, data}
  logic [31:0] lbq [NLANE][$];         // load buffers
  int checks = 0, failures = 0, fires = 0, done_cnt = 0;

  vipers_memunit #(.NLANE(NLANE), .VPW(32), .MEMW(128), .MEMMINW(8), .DEPTH(DEPTH)) dut (.*);
  vipers_mainmem #(.MEMW(128), .MEMMINW(8), .DEPTH(DEPTH)) u_mem (
    .clk, .addr(mem_addr), .we(mem_we), .uen(mem_uen), .wdata(mem_wdata), .rdata(mem_rdata));

  always #5 clk = ~clk;

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

  function automatic void refresh();
    lb_empty_all = 1;
    for (int l = 0; l < NLANE; l++) begin
      sb_empty[l] = (sbq[l].size() == 0);
      {sb_off[l], sb_data[l]} = sb_empty[l] ? 64'd0 : sbq[l][0];
      if (lbq[l].size() != 0) lb_empty_all = 0;
    end
  endfunction

  // buffer side of the lanes: pops and pushes seen at the clock edge
  always @(posedge clk) begin
    logic [NLANE-1:0] pop, push;
    logic [NLANE-1:0][31:0] d;
    pop = sb_pop; push = lb_push; d = lb_data;
    if (|lb_push || (mem_we && !s_gnt)) fires++;   // one per memory access
    if (ld_done) done_cnt++;
    #1;
    for (int l = 0; l < NLANE; l++) begin
      if (pop[l]) void'(sbq[l].pop_front());
      if (push[l]) lbq[l].push_back(d[l]);
    end
    refresh();
  end

  function automatic logic [31:0] mread(int a, msize_e sz, logic sx);
    logic [31:0] w;
    w = {bm[(a + 3) % NB], bm[(a + 2) % NB], bm[(a + 1) % NB], bm[a % NB]};
    case (sz)
      SZ_B: return sx ? {{24{w[7]}}, w[7:0]} : {24'd0, w[7:0]};
      SZ_H: return sx ? {{16{w[15]}}, w[15:0]} : {16'd0, w[15:0]};
      default: return w;
    endcase
  endfunction

  function automatic void mwrite(int a, msize_e sz, logic [31:0] d);
    for (int i = 0; i < (1 << sz); i++) begin bm[a + i] = d[8 * i +: 8]; bw[a + i] = 1; end
  endfunction

  task automatic swrite(msize_e sz, int a, logic [31:0] d);
    @(negedge clk); s_req = 1; s_we = 1; s_size = sz; s_addr = a; s_wdata = d;
    #1; while (!s_gnt) begin @(negedge clk); #1; end
    @(negedge clk); s_req = 0; s_we = 0;
    mwrite(a, sz, d);
  endtask

  task automatic sread(msize_e sz, int a);
    @(negedge clk); s_req = 1; s_we = 0; s_size = sz; s_addr = a;
    #1; while (!s_gnt) begin @(negedge clk); #1; end
    @(negedge clk); s_req = 0;
    checks++;
    if (!s_rvalid) failures++;
    chk("scalar read", s_rdata, mread(a, sz, 1'b0));
  endtask

  task automatic issue(logic st, amode_e m, msize_e sz, logic sx, int base, int stride, int vl);
    @(negedge clk);
    fires = 0; done_cnt = 0;
    cmd_valid = 1;
    cmd = '{store: st, mode: m, size: sz, sext: sx, base: base, stride: stride, vl: 16'(vl)};
    #1; while (!cmd_pop) begin @(negedge clk); #1; end
    @(negedge clk); cmd_valid = 0;
    while (busy) @(negedge clk);
    @(negedge clk);
  endtask

  function automatic int eaddr(amode_e m, msize_e sz, int base, int stride, int e, int idx);
    case (m)
      AM_UNIT:   return base + (e << sz);
      AM_STRIDE: return base + ((e * stride) << sz);
      default:   return base + idx;
    endcase
  endfunction

  // vector load, checked element by element in the load buffers
  task automatic vload(amode_e m, msize_e sz, logic sx, int base, int stride, int vl, int exp_cycles);
    int idx [];
    idx = new[vl];
    for (int e = 0; e < vl; e++) begin
      idx[e] = ($urandom % 64) << sz;
      if (m == AM_INDEX) sbq[e % NLANE].push_back({32'(idx[e]), 32'd0});
    end
    refresh();
    issue(1'b0, m, sz, sx, base, stride, vl);
    chk("load done pulses", done_cnt, 1);
    if (exp_cycles >= 0) chk("load memory cycles", fires, exp_cycles);
    for (int e = 0; e < vl; e++)
      chk("load element", (lbq[e % NLANE].size() > e / NLANE) ? lbq[e % NLANE][e / NLANE] : 32'hDEAD,
          mread(eaddr(m, sz, base, stride, e, idx[e]), sz, sx));
    for (int l = 0; l < NLANE; l++) lbq[l].delete();
    refresh();
  endtask

  // vector store of random data; the byte model is updated in element order
  task automatic vstore(amode_e m, msize_e sz, int base, int stride, int vl, int exp_cycles);
    int perm[$];
    for (int i = 0; i < 64; i++) perm.push_back(i << sz);
    perm.shuffle();
    for (int e = 0; e < vl; e++) begin
      logic [31:0] d;
      d = $urandom;
      sbq[e % NLANE].push_back({32'(perm[e]), d});
      mwrite(eaddr(m, sz, base, stride, e, perm[e]), sz, d);
    end
    refresh();
    issue(1'b1, m, sz, 1'b0, base, stride, vl);
    if (exp_cycles >= 0) chk("store memory cycles", fires, exp_cycles);
    for (int l = 0; l < NLANE; l++) chk("store buffer drained", sbq[l].size(), 0);
  endtask

  initial begin
    refresh();
    #12 rst_n = 1;
    // scalar port: fill the first 2 KB, read back mixed sizes
    for (int a = 0; a < 2048; a += 4) swrite(SZ_W, a, $urandom);
    for (int t = 0; t < 30; t++) begin
      msize_e sz; sz = msize_e'(t % 3);
      sread(sz, ($urandom % 2048) & ~((1 << sz) - 1));
    end
    // loads
    vload(AM_UNIT,   SZ_W, 1'b0, 32'h040, 0, 64, 16);   // VL/4
    vload(AM_UNIT,   SZ_B, 1'b1, 32'h103, 0, 64, 5);    // 13+16+16+16+3 bytes
    vload(AM_UNIT,   SZ_H, 1'b0, 32'h202, 0, 33, 5);
    vload(AM_STRIDE, SZ_W, 1'b0, 32'h300, 2, 64, 32);   // VL/2
    vload(AM_STRIDE, SZ_H, 1'b1, 32'h400, 3, 40, -1);
    vload(AM_INDEX,  SZ_W, 1'b0, 32'h500, 0, 20, 20);   // one per cycle
    vload(AM_INDEX,  SZ_B, 1'b1, 32'h600, 0, 64, 64);
    // a load waits until the load buffers are empty
    lbq[3].push_back(32'h1); refresh();
    @(negedge clk); cmd_valid = 1; cmd = '{store: 0, mode: AM_UNIT, size: SZ_W, sext: 0, base: 0, stride: 0, vl: 16};
    repeat (5) begin @(negedge clk); #1; chk("load held by full buffer", 32'(cmd_pop), 0); end
    cmd_valid = 0; lbq[3].delete(); refresh();
    // stores
    vstore(AM_UNIT,   SZ_W, 32'h800, 0, 64, 16);
    vstore(AM_UNIT,   SZ_B, 32'h905, 0, 50, 13);  // four per cycle: 3+4+4+2 runs
    vstore(AM_UNIT,   SZ_H, 32'hA02, 0, 20, 6);
    vstore(AM_STRIDE, SZ_W, 32'hB00, 3, 30, 22);     // neighbours in one line go together
    vstore(AM_STRIDE, SZ_B, 32'hC01, 5, 30, -1);
    vstore(AM_INDEX,  SZ_H, 32'hD00, 0, 40, 40);
    vstore(AM_INDEX,  SZ_W, 32'hE00, 0, 64, 64);
    // scalar sub-word writes after vector traffic
    swrite(SZ_B, 32'h905, 32'h5A);
    swrite(SZ_H, 32'hA06, 32'hBEEF);
    sread(SZ_B, 32'h905);
    sread(SZ_H, 32'hA06);
    // the whole memory against the byte model
    for (int a = 0; a < NB; a++) begin
      if (!bw[a]) continue;
      checks++;
      if (u_mem.mem[a / 16][8 * (a % 16) +: 8] !== bm[a]) begin
        failures++; if (failures < 20) $display("FAIL memory byte %h", a);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
