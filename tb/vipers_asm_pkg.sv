// vipers_asm_pkg: instruction encoders used by the testbenches.
//
// Builds 32-bit vector instructions in the layout described in vipers_pkg:
// arithmetic (opcode 0x3D), memory (0x3E) and control (0x3F) formats.
package vipers_asm_pkg;
  import vipers_pkg::*;

  function automatic logic [31:0] varith(vfunc_e f, int vd, int va, int vb,
                                         bit vs = 1'b0, bit mask = 1'b0);
    return {mask, vs, 6'(vd), 6'(va), 6'(vb), 6'(f), OP_VARITH};
  endfunction

  // size: 0 byte, 1 half, 2 word; idx: index register (indexed) or vstride
  // register number (strided); base/inc: vbase and vinc register numbers
  function automatic logic [31:0] vmem(mfunc_e f, int size, int vr, int idx,
                                       int base, int inc);
    return {2'(size), 6'(vr), 6'(idx), 3'(base), 3'(inc), 6'(f), OP_VMEM};
  endfunction

  function automatic logic [31:0] vctrl(cfunc_e f, int vr, int creg);
    return {2'b00, 6'(vr), 6'd0, 6'(creg), 6'(f), OP_VCTRL};
  endfunction
endpackage
