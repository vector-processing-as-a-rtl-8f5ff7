// tb_vipers_fir: FIR filter kernel on the full sixteen-lane design, in the
// form of the vmac/vcczacc/vupshift loop: the coefficients are loaded once;
// for every block of NTAPS outputs a window of 2*NTAPS samples is loaded
// (advancing vbase0 by NTAPS samples), and each output is one vmac over
// NTAPS elements, one vcczacc, one vext.vs, then a vupshift of the window
// by one element. All outputs are compared with a direct convolution
// computed here; the cycles per output are printed.
module tb_vipers_fir;
  import vipers_pkg::*;
  import vipers_asm_pkg::*;
  localparam int WATCHDOG = 200000;
  `include "vipers_host.svh"

  localparam int NTAPS = 16, NOUT = 64;
  localparam logic [31:0] XB = 32'h1000, CB = 32'h0800;
  int x [NOUT + NTAPS];
  int c [NTAPS];

  initial begin
    logic [31:0] r;
    longint t0;
    wait (rst_n);
    for (int i = 0; i < NOUT + NTAPS; i++) begin x[i] = int'($urandom % 2001) - 1000; swrite(XB + 4 * i, x[i]); end
    for (int t = 0; t < NTAPS; t++) begin c[t] = int'($urandom % 201) - 100; swrite(CB + 4 * t, c[t]); end
    setcr(CR_VL, NTAPS);
    setcr(CR_VBASE + 1, CB);
    send(vmem(M_LD, 2, 2, 0, 1, 7));             // v2 = coefficients (vinc7 = 0)
    setcr(CR_VBASE + 0, XB);
    setcr(CR_VINC + 0, 4 * NTAPS);               // advance x[] by NTAPS samples
    setcr(CR_VINDEX, 0);
    t0 = cyc;
    for (int blk = 0; blk < NOUT / NTAPS; blk++) begin
      setcr(CR_VL, 2 * NTAPS);
      send(vmem(M_LD, 2, 1, 0, 0, 0));           // v1 = window, vbase0 += vinc0
      for (int w = 2 * NTAPS; w > NTAPS; w--) begin
        int k, y;
        setcr(CR_VL, NTAPS);
        send(varith(F_MAC, 0, 1, 2));
        send(varith(F_CCZACC, 3, 0, 0));
        send(vctrl(C_EXTVS, 3, 0));
        get_res(r);
        k = blk * NTAPS + (2 * NTAPS - w);
        y = 0;
        for (int t = 0; t < NTAPS; t++) y += x[k + t] * c[t];
        check($sformatf("y[%0d]", k), r, y);
        setcr(CR_VL, w);
        send(varith(F_UPSHIFT, 1, 1, 0));
      end
    end
    wait_idle();
    $display("FIR: %0d taps, %0d outputs, %0d cycles per output", NTAPS, NOUT, (cyc - t0) / longint'(NOUT));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
