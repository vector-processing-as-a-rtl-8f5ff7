// tb_vipers_ctrl_regs: reset values, writes and reads of every register
// class, VL clamping to MVL, vbase auto-increment (also together with a
// write to another register) and the VL override used by vcczacc.
module tb_vipers_ctrl_regs;
  import vipers_pkg::*;
  localparam int MVL = 64;
  logic clk = 0, rst_n = 0, we = 0, inc_en = 0, vl_set = 0, masksel;
  logic [5:0] waddr = 0, raddr = 0;
  logic [31:0] wdata = 0, rdata;
  logic [2:0] inc_base = 0, inc_sel = 0;
  logic [15:0] vl_set_val = 0, vl, vindex;
  logic [NBASE-1:0][31:0] vbase, vinc, vstride;
  int checks = 0, failures = 0;

  vipers_ctrl_regs #(.MVL(MVL)) dut (.clk, .rst_n, .we, .waddr, .wdata, .raddr, .rdata, .inc_en, .inc_base,
                                    .inc_sel, .vl_set, .vl_set_val, .vl, .vindex, .masksel, .vbase, .vinc, .vstride);
  always #5 clk = ~clk;

  initial begin
    #200000;
    $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string s, logic [31:0] g, logic [31:0] e);
    checks++;
    if (g !== e) begin failures++; if (failures < 20) $display("FAIL %s got %0h exp %0h", s, g, e); end
  endtask

  task automatic wr(int r, logic [31:0] d);
    @(negedge clk); we = 1; waddr = 6'(r); wdata = d;
    @(negedge clk); we = 0;
  endtask

  task automatic rdchk(string s, int r, logic [31:0] e);
    raddr = 6'(r); #1;
    chk(s, rdata, e);
  endtask

  initial begin
    logic [31:0] sh [64];
    #12 rst_n = 1;
    @(negedge clk);
    chk("reset vl", vl, MVL);
    chk("reset vbase", vbase[3], 0);
    foreach (sh[i]) sh[i] = 0;
    sh[CR_VL] = MVL;
    for (int t = 0; t < 300; t++) begin
      int r; logic [31:0] d;
      r = 0;
      case (t % 6)
        0: r = CR_VL; 1: r = CR_VINDEX; 2: r = CR_MASKSEL;
        3: r = CR_VBASE + $urandom % 8; 4: r = CR_VINC + $urandom % 8; default: r = CR_VSTRIDE + $urandom % 8;
      endcase
      d = (r == CR_VL) ? $urandom % 100 : (r == CR_VINDEX) ? $urandom % 64 : (r == CR_MASKSEL) ? $urandom % 2 : $urandom;
      wr(r, d);
      sh[r] = (r == CR_VL && d > MVL) ? MVL : d;
      rdchk("readback", r, sh[r]);
    end
    chk("vl port", vl, sh[CR_VL]);
    chk("vindex port", vindex, sh[CR_VINDEX]);
    chk("masksel port", masksel, sh[CR_MASKSEL]);
    for (int i = 0; i < 8; i++) begin
      chk("vbase port", vbase[i], sh[CR_VBASE + i]);
      chk("vinc port", vinc[i], sh[CR_VINC + i]);
      chk("vstride port", vstride[i], sh[CR_VSTRIDE + i]);
    end
    // auto-increment, together with a write to another register
    for (int t = 0; t < 50; t++) begin
      int b, s;
      b = $urandom % 8; s = $urandom % 8;
      @(negedge clk); inc_en = 1; inc_base = 3'(b); inc_sel = 3'(s);
      we = 1; waddr = 6'(CR_VSTRIDE + s); wdata = $urandom;
      @(negedge clk); inc_en = 0; we = 0;
      sh[CR_VBASE + b] += sh[CR_VINC + s];
      sh[CR_VSTRIDE + s] = wdata;
      chk("increment", vbase[b], sh[CR_VBASE + b]);
      chk("stride with increment", vstride[s], sh[CR_VSTRIDE + s]);
    end
    @(negedge clk); vl_set = 1; vl_set_val = 16'd4;
    @(negedge clk); vl_set = 0;
    chk("vl override", vl, 4);
    rdchk("vl read", CR_VL, 4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
