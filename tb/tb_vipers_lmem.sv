// tb_vipers_lmem: local memory in both modes. Shared: every slot sees one
// table of LMEMN words. Split: each slot has its own LMEMN/EPL-word section,
// so the same address in different slots reaches different words.
module tb_vipers_lmem;
  localparam int N = 256, EPL = 4, SECT = N / EPL;
  logic clk = 0, we = 0, re = 0;
  logic [1:0] slot = 0;
  logic [31:0] addr = 0, wdata = 0, rd_sh, rd_sp;
  logic [31:0] m_sh [N], m_sp [N];
  int checks = 0, failures = 0;

  vipers_lmem #(.VPW(32), .LMEMN(N), .EPL(EPL), .LMEMSHARE(1'b1)) u_sh (
    .clk, .we, .re, .slot, .addr, .wdata, .rdata(rd_sh));
  vipers_lmem #(.VPW(32), .LMEMN(N), .EPL(EPL), .LMEMSHARE(1'b0)) u_sp (
    .clk, .we, .re, .slot, .addr, .wdata, .rdata(rd_sp));

  always #5 clk = ~clk;

  initial begin
    #200000;
    $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N; i++) begin
      @(negedge clk); we = 1; slot = 2'(i / SECT); addr = 32'(i); wdata = $urandom;
      m_sh[i] = wdata;
      m_sp[(i / SECT) * SECT + (i % SECT)] = wdata;
    end
    @(negedge clk); we = 0;
    for (int t = 0; t < 800; t++) begin
      @(negedge clk); re = 1; slot = $urandom; addr = $urandom;
      @(negedge clk); re = 0;
      checks += 2;
      if (rd_sh !== m_sh[addr[7:0]]) begin failures++; if (failures < 10) $display("FAIL shared %h", addr); end
      if (rd_sp !== m_sp[slot * SECT + addr % SECT]) begin
        failures++; if (failures < 10) $display("FAIL split slot %0d addr %h", slot, addr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
