// tb_vipers_shifter: random data and every shift amount for the four shift
// operations, compared with SystemVerilog shift operators.
module tb_vipers_shifter;
  logic [31:0] din, dout, exp;
  logic [4:0]  amt;
  logic [1:0]  op;
  int checks = 0, failures = 0;

  vipers_shifter #(.VPW(32)) dut (.din, .amt, .op, .dout);

  initial begin
    #100000;
    $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      din = $urandom; amt = 5'(t % 32); op = 2'(t / 32);
      #1;
      case (op)
        2'd0: exp = din << amt;
        2'd1: exp = din >> amt;
        2'd2: exp = $signed(din) >>> amt;
        default: exp = (din >> amt) | ((amt == 0) ? 32'd0 : din << (32 - amt));
      endcase
      checks++;
      if (dout !== exp) begin
        failures++;
        if (failures < 10) $display("FAIL op=%0d amt=%0d din=%h got %h exp %h", op, amt, din, dout, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
