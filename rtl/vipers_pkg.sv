// vipers_pkg: types, opcodes and constants shared by the VIPERS-style soft
// vector processor.
//
// The vector instructions live in the three Nios II opcodes 0x3D..0x3F, as
// the architecture prescribes. Only those opcode numbers are fixed; the bit
// layout inside the 32-bit word is this design's own choice:
//
//   all:        [5:0] opcode, [11:6] func
//   arithmetic: [31] mask, [30] vs (operand B is the broadcast scalar),
//   (0x3D)      [29:24] vd, [23:18] va, [17:12] vb.
//               Compares write flag register vd[0]; masked execution uses
//               the flag register named by control register MASKSEL.
//   memory:     [31:30] size (0 byte, 1 half, 2 word), [29:24] data register,
//   (0x3E)      [23:18] index register (indexed modes; its low 3 bits name
//               the vstride register in strided modes), [17:15] vbase
//               register, [14:12] vinc register (auto-increment of vbase).
//   control:    [29:24] vector register, [17:12] control register number.
//   (0x3F)
package vipers_pkg;

  localparam logic [5:0] OP_VARITH = 6'h3D;
  localparam logic [5:0] OP_VMEM   = 6'h3E;
  localparam logic [5:0] OP_VCTRL  = 6'h3F;

  // Arithmetic and lane operations (opcode 0x3D)
  typedef enum logic [5:0] {
    F_ADD     = 6'd0,
    F_SUB     = 6'd1,
    F_AND     = 6'd2,
    F_OR      = 6'd3,
    F_XOR     = 6'd4,
    F_NOR     = 6'd5,
    F_MAX     = 6'd6,
    F_MIN     = 6'd7,
    F_MAXU    = 6'd8,
    F_MINU    = 6'd9,
    F_ABS     = 6'd10,
    F_ABSDIFF = 6'd11,
    F_ABSDIFFU= 6'd12,
    F_MERGE   = 6'd13,   // vd = flag ? va : vb
    F_MOV     = 6'd14,   // vd = va
    F_CMPEQ   = 6'd15,   // flag[vd[0]] = (va == vb)
    F_CMPNE   = 6'd16,
    F_CMPLT   = 6'd17,
    F_CMPLE   = 6'd18,
    F_CMPLTU  = 6'd19,
    F_CMPLEU  = 6'd20,
    F_SLL     = 6'd21,
    F_SRL     = 6'd22,
    F_SRA     = 6'd23,
    F_ROT     = 6'd24,   // rotate right
    F_MUL     = 6'd25,   // low half of the product
    F_MULHI   = 6'd26,   // high half, signed
    F_MULHIU  = 6'd27,   // high half, unsigned
    F_MAC     = 6'd32,   // accumulate va*vb into the distributed accumulators
    F_CCZACC  = 6'd33,   // vd = chain sums, accumulators cleared, VL = chains
    F_UPSHIFT = 6'd34,   // vd[i] = va[i+1], vd[VL-1] = va[0]
    F_LDL     = 6'd35,   // vd[i] = lmem[va[i]]
    F_STL     = 6'd36    // lmem[va[i]] = vb[i]  (or the scalar when vs = 1)
  } vfunc_e;

  // Memory operations (opcode 0x3E)
  typedef enum logic [5:0] {
    M_LD    = 6'd0,   // unit stride load, sign extended
    M_LDU   = 6'd1,   // unit stride load, zero extended
    M_LDS   = 6'd2,   // constant stride load
    M_LDSU  = 6'd3,
    M_LDX   = 6'd4,   // indexed load: address = base + va[i]
    M_LDXU  = 6'd5,
    M_ST    = 6'd8,   // unit stride store
    M_STS   = 6'd9,   // constant stride store
    M_STX   = 6'd10   // indexed store
  } mfunc_e;

  // Control and scalar transfer operations (opcode 0x3F)
  typedef enum logic [5:0] {
    C_MSTC   = 6'd0,  // control register [17:12] = scalar
    C_MCTS   = 6'd1,  // scalar result = control register [17:12]
    C_EXTVS  = 6'd2,  // scalar result = va[vindex]
    C_INSVS  = 6'd3   // vd[vindex] = scalar
  } cfunc_e;

  // Control register numbers (vmstc / vmcts)
  localparam int unsigned CR_VL      = 0;
  localparam int unsigned CR_VINDEX  = 1;
  localparam int unsigned CR_MASKSEL = 2;   // flag register used by masked ops
  localparam int unsigned CR_VBASE   = 16;  // 16..23 vbase0..7
  localparam int unsigned CR_VINC    = 24;  // 24..31 vinc0..7
  localparam int unsigned CR_VSTRIDE = 32;  // 32..39 vstride0..7
  localparam int unsigned NBASE      = 8;

  // Access sizes
  typedef enum logic [1:0] {SZ_B = 2'd0, SZ_H = 2'd1, SZ_W = 2'd2} msize_e;

  // Memory access modes
  typedef enum logic [1:0] {AM_UNIT = 2'd0, AM_STRIDE = 2'd1, AM_INDEX = 2'd2} amode_e;

  // Command from the vector controller to the memory unit
  typedef struct packed {
    logic        store;     // 1: store, 0: load
    amode_e      mode;
    msize_e      size;
    logic        sext;      // loads: sign extend
    logic [31:0] base;      // byte address of element 0
    logic [31:0] stride;    // stride in elements (constant stride mode)
    logic [15:0] vl;        // number of elements
  } memcmd_t;


  // Micro-operation kinds issued by the vector controller, one per element
  // group (one element slot in every lane) and cycle.
  typedef enum logic [3:0] {
    U_ALU   = 4'd0,   // ALU, shifter or multiplier op, incl. compares
    U_MAC   = 4'd1,   // vmac: products into the distributed accumulators
    U_CCZ   = 4'd2,   // vcczacc: chain sums into vd, accumulators cleared
    U_UPSH  = 4'd3,   // vupshift through the shift chain
    U_LDL   = 4'd4,   // local memory read
    U_STL   = 4'd5,   // local memory write
    U_LDWB  = 4'd6,   // load buffers to register file
    U_STRD  = 4'd7,   // register file to store buffers (data, index)
    U_IDXRD = 4'd8,   // index register to store buffers (indexed load)
    U_EXT   = 4'd9,   // element vindex to the scalar core
    U_INS   = 4'd10   // scalar into element vindex
  } ukind_e;

  typedef struct packed {
    logic        valid;
    ukind_e      kind;
    vfunc_e      func;
    logic [5:0]  vd;        // destination register (flag: vd[0])
    logic [5:0]  va;        // first source (data register of stores)
    logic [5:0]  vb;        // second source (index register of stores)
    logic [7:0]  slot;      // element slot within each lane
    logic        vs;        // operand B is the scalar
    logic [31:0] scalar;    // scalar operand
    logic        mask;      // masked execution
    logic        msel;      // flag register used as mask / merge select
    logic        wvreg;     // writes vector register vd
    logic        wflag;     // writes flag register vd[0]
    logic [15:0] vl;        // vector length (element count)
    logic [15:0] vindex;    // element addressed by EXT / INS
  } uop_t;

  function automatic int unsigned clog2_min1(int unsigned v);
    return (v <= 1) ? 1 : $clog2(v);
  endfunction

endpackage
