// tb_vipers_median: 5x5 median filter kernel on the full sixteen-lane
// design. VL is 64, so one pass produces 64 output pixels of a row. The 25
// window pixels of each output are byte-loaded (zero extended) into
// v1..v25, one unit-stride load per window position; the partial bubble
// sort of the kernel (vmax into v31, vmin into vi, vmov back into vj, for
// i = 1..12 and j = i+1..25) followed by a final vmin pass leaves the
// median in v13, which is stored with a byte store. Two output rows are
// computed and every pixel is compared with a median computed here.
// The same rows are then filtered by the loop form, which keeps the 25
// window rows as an array in memory and loads and stores them on every
// compare step; its results are checked too, and the unrolled form must
// be at least twice as fast.
module tb_vipers_median;
  import vipers_pkg::*;
  import vipers_asm_pkg::*;
  localparam int WATCHDOG = 400000;
  `include "vipers_host.svh"

  localparam int W = 68, H = 6, NR = 2;
  localparam logic [31:0] IMG = 32'h2000, OUT = 32'h4000, OUT2 = 32'h4800, ARR = 32'h5000;
  byte unsigned img [H * W];

  function automatic int median25(int r, int c);
    int v [25];
    int n = 0;
    for (int dr = 0; dr < 5; dr++)
      for (int dc = 0; dc < 5; dc++) begin v[n] = img[(r + dr) * W + c + dc]; n++; end
    v.sort();
    return v[12];
  endfunction

  initial begin
    logic [31:0] r;
    longint t0, t1, t2, tl;
    wait (rst_n);
    tl = 0;
    for (int i = 0; i < H * W; i += 4) begin
      logic [31:0] wd;
      for (int k = 0; k < 4; k++) begin img[i + k] = byte'($urandom); wd[8*k +: 8] = img[i + k]; end
      swrite(IMG + i, wd);
    end
    setcr(CR_VL, 64);
    setcr(CR_VINC + 7, 0);
    t0 = cyc;
    for (int row = 0; row < NR; row++) begin
      for (int dr = 0; dr < 5; dr++)
        for (int dc = 0; dc < 5; dc++) begin
          setcr(CR_VBASE + 1, IMG + (row + dr) * W + dc);
          send(vmem(M_LDU, 0, 1 + dr * 5 + dc, 0, 1, 7));
        end
      for (int i = 1; i <= 12; i++)
        for (int j = i + 1; j <= 25; j++) begin
          send(varith(F_MAX, 31, i, j));
          send(varith(F_MIN, i, i, j));
          send(varith(F_MOV, j, 31, 0));
        end
      for (int j = 14; j <= 25; j++) send(varith(F_MIN, 13, 13, j));
      setcr(CR_VBASE + 2, OUT + row * 64);
      send(vmem(M_ST, 0, 13, 0, 2, 7));
    end
    wait_idle();
    t1 = cyc;
    for (int row = 0; row < NR; row++)
      for (int c = 0; c < 64; c++) begin
        sread(OUT + row * 64 + c, r, 0);
        check($sformatf("median[%0d][%0d]", row, c), r & 32'hff, median25(row, c));
      end
    $display("median, unrolled: %0d rows of 64 pixels, %0d cycles per row", NR, (t1 - t0) / longint'(NR));

    // Loop form: the 25 window rows of each output row are copied into an
    // array of 25 vectors in memory (ARR, 64 bytes each). Each pass i loads
    // array[i] into v4, then for every j loads array[j] into v2, keeps the
    // larger in v31 and stores it back to array[j], and keeps the smaller
    // in v4, which is stored to array[i] at the end of the pass. The last
    // pass only takes the minimum, which is the median.
    setcr(CR_VINC + 0, 64);
    for (int row = 0; row < NR; row++) begin
      for (int k = 0; k < 25; k++) begin
        setcr(CR_VBASE + 1, IMG + (row + k / 5) * W + k % 5);
        send(vmem(M_LDU, 0, 1, 0, 1, 7));
        setcr(CR_VBASE + 2, ARR + 64 * k);
        send(vmem(M_ST, 0, 1, 0, 2, 7));
      end
      wait_idle();
      t2 = cyc;
      for (int i = 0; i < 12; i++) begin
        setcr(CR_VBASE + 1, ARR + 64 * i);
        send(vmem(M_LDU, 0, 4, 0, 1, 7));
        setcr(CR_VBASE + 2, ARR + 64 * (i + 1));
        setcr(CR_VBASE + 3, ARR + 64 * (i + 1));
        for (int j = i + 1; j < 25; j++) begin
          send(vmem(M_LDU, 0, 2, 0, 2, 0));
          send(varith(F_MAX, 31, 2, 4));
          send(varith(F_MIN, 4, 2, 4));
          send(vmem(M_ST, 0, 31, 0, 3, 0));
        end
        send(vmem(M_ST, 0, 4, 0, 1, 7));
      end
      setcr(CR_VBASE + 1, ARR + 64 * 12);
      send(vmem(M_LDU, 0, 4, 0, 1, 0));
      for (int j = 13; j < 25; j++) begin
        send(vmem(M_LDU, 0, 2, 0, 1, 0));
        send(varith(F_MIN, 4, 2, 4));
      end
      setcr(CR_VBASE + 2, OUT2 + row * 64);
      send(vmem(M_ST, 0, 4, 0, 2, 7));
      wait_idle();
      tl += cyc - t2;
    end
    for (int row = 0; row < NR; row++)
      for (int c = 0; c < 64; c++) begin
        sread(OUT2 + row * 64 + c, r, 0);
        check($sformatf("loop median[%0d][%0d]", row, c), r & 32'hff, median25(row, c));
      end
    $display("median, loop form: %0d cycles per row", tl / longint'(NR));
    // the document reports the unrolled form as about three times faster
    check("unrolled form at least twice as fast", 32'(2 * (t1 - t0) <= tl), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
