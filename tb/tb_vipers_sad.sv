// tb_vipers_sad: motion estimation kernel (sum of absolute differences of a
// 16x16 block against a search window) on the full sixteen-lane design.
// VL is 16. For each candidate position, each of the 16 rows loads a block
// row and a window row as zero-extended bytes with auto-incrementing base
// registers (vinc1 = 16, vinc2 = window width), takes vabsdiff and adds it
// to v5. The 16 partial sums are then reduced with vmac against a vector of
// ones and vcczacc, and the total is read back with vext.vs. Each SAD is
// compared with one computed here. Two more forms follow on the same
// data: a software-pipelined loop (two rows per step, no dependence
// stalls) and the fully unrolled form that keeps block and window rows in
// registers and slides down a column, storing each SAD with vst.h. The
// pipelined form must be faster than the plain one and the unrolled form
// at least twice as fast.
// v5 and v6 are cleared with vand.vs and a zero scalar rather than by subtracting
// a register from itself: a register never written may read differently
// through its two read-port copies.
module tb_vipers_sad;
  import vipers_pkg::*;
  import vipers_asm_pkg::*;
  localparam int WATCHDOG = 400000;
  `include "vipers_host.svh"

  localparam int FW = 48, FH = 32, NPOS = 24;
  localparam int NX = 3, NY = 16;
  localparam logic [31:0] FRM = 32'h3000, BLK = 32'h2000, MET = 32'h4000;
  byte unsigned frm [FW * FH];
  byte unsigned blk [256];

  function automatic int sad(int m, int n);
    int acc, d;
    acc = 0;
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        d = int'(blk[i * 16 + j]) - int'(frm[(m + i) * FW + n + j]);
        acc += (d < 0) ? -d : d;
      end
    return acc;
  endfunction

  task automatic put_bytes(input logic [31:0] a, input byte unsigned b [], input int n);
    for (int i = 0; i < n; i += 4)
      swrite(a + i, {b[i + 3], b[i + 2], b[i + 1], b[i]});
  endtask

  initial begin
    logic [31:0] r;
    byte unsigned tmp [];
    longint t0, t1, t2, t3, t4, t5;
    int xs [NX];
    int pm [NPOS], pn [NPOS];
    wait (rst_n);
    tmp = new[FW * FH];
    foreach (frm[i]) begin frm[i] = byte'($urandom); tmp[i] = frm[i]; end
    put_bytes(FRM, tmp, FW * FH);
    tmp = new[256];
    foreach (blk[i]) begin blk[i] = byte'($urandom); tmp[i] = blk[i]; end
    put_bytes(BLK, tmp, 256);
    foreach (xs[i]) xs[i] = int'($urandom % (FW - 15));
    for (int p = 0; p < NPOS; p++) begin pm[p] = int'($urandom % (FH - 15)); pn[p] = int'($urandom % (FW - 15)); end
    setcr(CR_VL, 16);
    setcr(CR_VINC + 1, 16);
    setcr(CR_VINC + 2, FW);
    send(varith(F_AND, 6, 6, 0, 1), 0);
    send(varith(F_ADD, 6, 6, 0, 1), 1);          // v6 = ones
    setcr(CR_VINDEX, 0);
    t0 = cyc;
    for (int p = 0; p < NPOS; p++) begin
      int expv;
      expv = 0;
      setcr(CR_VBASE + 1, BLK);
      setcr(CR_VBASE + 2, FRM + pm[p] * FW + pn[p]);
      send(varith(F_AND, 5, 5, 0, 1), 0);       // v5 = 0
      for (int i = 0; i < 16; i++) begin
        send(vmem(M_LDU, 0, 2, 0, 1, 1));
        send(vmem(M_LDU, 0, 3, 0, 2, 2));
        send(varith(F_ABSDIFF, 4, 2, 3));
        send(varith(F_ADD, 5, 5, 4));
      end
      send(varith(F_MAC, 0, 5, 6));
      send(varith(F_CCZACC, 7, 0, 0));
      send(vctrl(C_EXTVS, 7, 0));
      get_res(r);
      setcr(CR_VL, 16);
      for (int i = 0; i < 16; i++)
        for (int j = 0; j < 16; j++) begin
          int d;
          d = int'(blk[i * 16 + j]) - int'(frm[(pm[p] + i) * FW + pn[p] + j]);
          expv += (d < 0) ? -d : d;
        end
      check($sformatf("SAD at (%0d,%0d)", pm[p], pn[p]), r, expv);
    end
    wait_idle();
    t1 = cyc;
    $display("SAD: %0d positions, %0d cycles per position", NPOS, (t1 - t0) / longint'(NPOS));

    // Same positions, software-pipelined: two rows per step, interleaved
    // so that no instruction waits for the one just before it.
    t2 = cyc;
    for (int p = 0; p < NPOS; p++) begin
      setcr(CR_VBASE + 1, BLK);
      setcr(CR_VBASE + 2, FRM + pm[p] * FW + pn[p]);
      send(varith(F_AND, 5, 5, 0, 1), 0);
      send(varith(F_AND, 14, 14, 0, 1), 0);
      for (int i = 0; i < 16; i += 2) begin
        send(vmem(M_LDU, 0, 2, 0, 1, 1));
        send(vmem(M_LDU, 0, 3, 0, 2, 2));
        send(vmem(M_LDU, 0, 12, 0, 1, 1));
        send(vmem(M_LDU, 0, 13, 0, 2, 2));
        send(varith(F_ADD, 5, 5, 14));
        send(varith(F_ABSDIFF, 4, 2, 3));
        send(varith(F_ABSDIFF, 14, 12, 13));
        send(varith(F_ADD, 5, 5, 4));
      end
      send(varith(F_ADD, 5, 5, 14));
      send(varith(F_MAC, 0, 5, 6));
      send(varith(F_CCZACC, 7, 0, 0));
      send(vctrl(C_EXTVS, 7, 0));
      get_res(r);
      setcr(CR_VL, 16);
      check($sformatf("pipelined SAD at (%0d,%0d)", pm[p], pn[p]), r, sad(pm[p], pn[p]));
    end
    wait_idle();
    t3 = cyc;
    $display("SAD, pipelined: %0d cycles per position", (t3 - t2) / longint'(NPOS));

    // Fully unrolled: block rows stay in v1..v16 and 16 frame rows in
    // v17..v32; moving down one row reloads only the row that left the
    // window. calc_sad groups four vabsdiff before their four vmac, with
    // a vector of ones as the other vmac operand; each SAD is stored as a
    // halfword with vst.h. v40 holds the ones, as v6 is reused here.
    send(varith(F_AND, 40, 40, 0, 1), 0);
    send(varith(F_ADD, 40, 40, 0, 1), 1);
    setcr(CR_VBASE + 1, BLK);
    for (int i = 0; i < 16; i++) send(vmem(M_LDU, 0, 1 + i, 0, 1, 1));
    setcr(CR_VINC + 3, 2);
    t4 = cyc;
    for (int xi = 0; xi < NX; xi++) begin
      setcr(CR_VBASE + 2, FRM + xs[xi]);
      setcr(CR_VBASE + 3, MET + 64 * xi);
      for (int i = 0; i < 16; i++) send(vmem(M_LDU, 0, 17 + i, 0, 2, 2));
      for (int y = 0; y < NY; y++) begin
        for (int g = 0; g < 16; g += 4) begin
          for (int k = 0; k < 4; k++) send(varith(F_ABSDIFF, 33 + k, 1 + g + k, 17 + (y + g + k) % 16));
          for (int k = 0; k < 4; k++) send(varith(F_MAC, 0, 40, 33 + k));
        end
        send(varith(F_CCZACC, 41, 0, 0));
        send(vmem(M_ST, 1, 41, 0, 3, 3));
        setcr(CR_VL, 16);
        send(vmem(M_LDU, 0, 17 + y % 16, 0, 2, 2));
      end
    end
    wait_idle();
    t5 = cyc;
    for (int xi = 0; xi < NX; xi++)
      for (int y = 0; y < NY; y++) begin
        sread(MET + 64 * xi + 2 * y, r, 1);
        check($sformatf("unrolled SAD at (%0d,%0d)", y, xs[xi]), r & 32'hffff, sad(y, xs[xi]));
      end
    $display("SAD, fully unrolled: %0d cycles per position", (t5 - t4) / longint'(NX * NY));
    // the document reports the pipelined and unrolled forms as faster
    check("pipelined form faster per position", 32'((t3 - t2) < (t1 - t0)), 1);
    check("unrolled form at least twice as fast per position",
          32'(2 * (t5 - t4) * NPOS <= (t1 - t0) * NX * NY), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
