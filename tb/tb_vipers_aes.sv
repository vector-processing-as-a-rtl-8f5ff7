// tb_vipers_aes: one AES encryption round on 64 blocks at once (VL = 64)
// on the full sixteen-lane design, using the table-lookup form: the 256-word
// T-table is first copied into every lane's local memory (vstl with the
// word as scalar operand and a broadcast index), the four state columns of
// all blocks are loaded with word loads of stride 4, and each output column
// is four vldl lookups (byte selection by vsrl; the local memory address
// wraps at the table size, so no masking is needed), rotations by vrot,
// vxor accumulation and a vxor with the scalar round key, stored back with
// a strided word store. The table is the real AES T-table built here from
// the S-box; the 64 x 4 output words are compared with a reference round.
// v10 are cleared with vand.vs and a zero scalar rather than by subtracting
// a register from itself: a register never written may read differently
// through its two read-port copies.
module tb_vipers_aes;
  import vipers_pkg::*;
  import vipers_asm_pkg::*;
  localparam int WATCHDOG = 400000;
  `include "vipers_host.svh"

  localparam int NB = 64;
  localparam logic [31:0] ST = 32'h1000, OUTB = 32'h2000;
  logic [7:0]  sbox [256];
  logic [31:0] tt [256];
  logic [31:0] state [NB][4];
  logic [31:0] rk [4];

  function automatic logic [7:0] xt(logic [7:0] a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic logic [7:0] gmul(logic [7:0] a, logic [7:0] b);
    logic [7:0] p;
    p = 0;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= a;
      a = xt(a);
    end
    return p;
  endfunction

  function automatic logic [31:0] rotl(logic [31:0] v, int n);
    return (n == 0) ? v : ((v << n) | (v >> (32 - n)));
  endfunction

  task automatic build_tables();
    for (int x = 0; x < 256; x++) begin
      logic [7:0] inv, s;
      inv = 0;
      if (x != 0) for (int y = 1; y < 256; y++) if (gmul(8'(x), 8'(y)) == 8'h01) inv = 8'(y);
      s = inv ^ {inv[6:0], inv[7]} ^ {inv[5:0], inv[7:6]} ^ {inv[4:0], inv[7:5]} ^ {inv[3:0], inv[7:4]} ^ 8'h63;
      sbox[x] = s;
      // column bytes, least significant first: 2s, s, s, 3s
      tt[x] = {gmul(s, 8'h03), s, s, gmul(s, 8'h02)};
    end
  endtask

  initial begin
    logic [31:0] r;
    longint t0, t1;
    wait (rst_n);
    build_tables();
    check("S-box[00]", 32'(sbox[8'h00]), 32'h63);
    check("S-box[53]", 32'(sbox[8'h53]), 32'hed);
    check("S-box[ff]", 32'(sbox[8'hff]), 32'h16);
    for (int b = 0; b < NB; b++)
      for (int c = 0; c < 4; c++) begin state[b][c] = $urandom; swrite(ST + 16 * b + 4 * c, state[b][c]); end
    foreach (rk[c]) rk[c] = $urandom;
    // table into every lane's local memory
    setcr(CR_VL, 16);
    send(varith(F_AND, 10, 10, 0, 1), 0);
    for (int t = 0; t < 256; t++) begin
      send(varith(F_STL, 0, 10, 0, 1), tt[t]);
      send(varith(F_ADD, 10, 10, 0, 1), 1);
    end
    wait_idle();
    t0 = cyc;
    setcr(CR_VL, NB);
    setcr(CR_VSTRIDE + 1, 4);
    setcr(CR_VINC + 1, 4);
    setcr(CR_VBASE + 1, ST);
    for (int c = 0; c < 4; c++) send(vmem(M_LDS, 2, 1 + c, 1, 1, 1));
    setcr(CR_VBASE + 2, OUTB);
    setcr(CR_VINC + 2, 4);
    for (int c = 0; c < 4; c++) begin
      send(varith(F_LDL, 11, 1 + c, 0));
      for (int k = 1; k < 4; k++) begin
        send(varith(F_SRL, 12, 1 + (c + k) % 4, 0, 1), 8 * k);
        send(varith(F_LDL, 12, 12, 0));
        send(varith(F_ROT, 12, 12, 0, 1), 32 - 8 * k);
        send(varith(F_XOR, 11, 11, 12));
      end
      send(varith(F_XOR, 11, 11, 0, 1), rk[c]);
      send(vmem(M_STS, 2, 11, 1, 2, 2));
    end
    wait_idle();
    t1 = cyc;
    for (int b = 0; b < NB; b++)
      for (int c = 0; c < 4; c++) begin
        logic [31:0] e;
        e = rk[c];
        for (int k = 0; k < 4; k++) e ^= rotl(tt[state[b][(c + k) % 4][8*k +: 8]], 8 * k);
        sread(OUTB + 16 * b + 4 * c, r);
        check($sformatf("block %0d column %0d", b, c), r, e);
      end
    $display("AES round: %0d blocks in %0d cycles", NB, t1 - t0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
