// tb_vipers_rd_xbar: random 128-bit lines, random per-element byte offsets
// and all sizes with and without sign extension.
module tb_vipers_rd_xbar;
  import vipers_pkg::*;
  localparam int NE = 16;
  logic [127:0] line;
  logic [NE-1:0][3:0] off;
  msize_e size;
  logic sext;
  logic [NE-1:0][31:0] elem;
  int checks = 0, failures = 0;

  vipers_rd_xbar #(.MEMW(128), .MEMMINW(8), .VPW(32), .NE(NE)) dut (.line, .off, .size, .sext, .elem);

  initial begin
    #100000;
    $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 600; t++) begin
      line = {$urandom, $urandom, $urandom, $urandom};
      size = msize_e'(t % 3); sext = t[2];
      for (int j = 0; j < NE; j++) begin
        int nb;
        nb = 1 << size;
        off[j] = 4'($urandom_range(0, 16 / nb - 1) * nb);
      end
      #1;
      for (int j = 0; j < NE; j++) begin
        logic [31:0] w, e;
        w = 32'(line >> (8 * off[j]));
        case (size)
          SZ_B: e = sext ? {{24{w[7]}}, w[7:0]} : {24'd0, w[7:0]};
          SZ_H: e = sext ? {{16{w[15]}}, w[15:0]} : {16'd0, w[15:0]};
          default: e = w;
        endcase
        checks++;
        if (elem[j] !== e) begin failures++; if (failures < 10) $display("FAIL size %0d off %0d", size, off[j]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
