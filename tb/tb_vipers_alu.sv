// tb_vipers_alu: checks every ALU operation on random and corner operands
// against a behavioural reference computed in the testbench.
module tb_vipers_alu;
  import vipers_pkg::*;
  localparam int VPW = 32;
  vfunc_e f;
  logic [VPW-1:0] a, b, r;
  logic fl, cmp;
  int checks = 0, failures = 0;

  vipers_alu #(.VPW(VPW), .VMULT(1'b1)) dut (.func(f), .a, .b, .flag(fl), .result(r), .cmp);

  initial begin
    #100000;
    $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void model(vfunc_e fn, logic [31:0] x, logic [31:0] y, logic fg,
                                output logic [31:0] er, output logic ec, output bit isc);
    logic signed [31:0] sx, sy;
    longint unsigned pu; longint ps;
    sx = x; sy = y; er = 0; ec = 0; isc = 0;
    pu = longint'(x) * longint'(y);
    ps = longint'(sx) * longint'(sy);
    case (fn)
      F_ADD: er = x + y;        F_SUB: er = x - y;
      F_AND: er = x & y;        F_OR:  er = x | y;
      F_XOR: er = x ^ y;        F_NOR: er = ~(x | y);
      F_MAX: er = (sx > sy) ? x : y;  F_MIN: er = (sx < sy) ? x : y;
      F_MAXU: er = (x > y) ? x : y;   F_MINU: er = (x < y) ? x : y;
      F_ABS: er = (sx < 0) ? -sx : sx;
      F_ABSDIFF: er = (sx > sy) ? x - y : y - x;
      F_ABSDIFFU: er = (x > y) ? x - y : y - x;
      F_MERGE: er = fg ? x : y;  F_MOV: er = x;
      F_CMPEQ: begin isc = 1; ec = (x == y); end
      F_CMPNE: begin isc = 1; ec = (x != y); end
      F_CMPLT: begin isc = 1; ec = (sx < sy); end
      F_CMPLE: begin isc = 1; ec = (sx <= sy); end
      F_CMPLTU: begin isc = 1; ec = (x < y); end
      F_CMPLEU: begin isc = 1; ec = (x <= y); end
      F_MUL: er = pu[31:0];
      F_MULHI: er = ps[63:32];
      F_MULHIU: er = pu[63:32];
      default: er = x;
    endcase
  endfunction

  vfunc_e ops[24] = '{F_ADD, F_SUB, F_AND, F_OR, F_XOR, F_NOR, F_MAX, F_MIN, F_MAXU, F_MINU,
                      F_ABS, F_ABSDIFF, F_ABSDIFFU, F_MERGE, F_MOV, F_CMPEQ, F_CMPNE, F_CMPLT,
                      F_CMPLE, F_CMPLTU, F_CMPLEU, F_MUL, F_MULHI, F_MULHIU};
  logic [31:0] corner[6] = '{32'h0, 32'h1, 32'hFFFF_FFFF, 32'h8000_0000, 32'h7FFF_FFFF, 32'h5};

  initial begin
    logic [31:0] er; logic ec; bit isc;
    for (int t = 0; t < 3000; t++) begin
      f  = ops[t % 24];
      a  = (t % 7 == 0) ? corner[t % 6] : $urandom;
      b  = (t % 5 == 0) ? corner[(t / 5) % 6] : (t % 11 == 0) ? a : $urandom;
      fl = $urandom;
      #1;
      model(f, a, b, fl, er, ec, isc);
      checks++;
      if (isc ? (cmp !== ec) : (r !== er)) begin
        failures++;
        if (failures < 10) $display("FAIL %s a=%h b=%h got r=%h c=%b exp %h %b", f.name(), a, b, r, cmp, er, ec);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
