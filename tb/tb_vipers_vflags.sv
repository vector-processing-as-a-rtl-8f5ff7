// tb_vipers_vflags: reset value (all ones), random writes to both flag
// registers and all slots, and combinational reads against a shadow copy.
module tb_vipers_vflags;
  logic clk = 0, rst_n = 0, we = 0, wsel = 0, wdata = 0, rsel = 0, rdata;
  logic [1:0] wslot = 0, rslot = 0;
  logic [3:0] shadow [2];
  int checks = 0, failures = 0;

  vipers_vflags #(.EPL(4), .NFLAG(2)) dut (.clk, .rst_n, .we, .wsel, .wslot, .wdata,
                                         .rsel, .rslot, .rdata);
  always #5 clk = ~clk;

  initial begin
    #100000;
    $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    shadow[0] = 4'hF; shadow[1] = 4'hF;
    #12 rst_n = 1;
    for (int s = 0; s < 8; s++) begin
      @(negedge clk); rsel = s[2]; rslot = 2'(s);
      #1 checks++; if (rdata !== 1'b1) failures++;
    end
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      we = $urandom; wsel = $urandom; wslot = $urandom; wdata = $urandom;
      rsel = $urandom; rslot = $urandom;
      #1 checks++;
      if (rdata !== shadow[rsel][rslot]) begin
        failures++; if (failures < 10) $display("FAIL flag %0d slot %0d", rsel, rslot);
      end
      @(posedge clk);
      if (we) shadow[wsel][wslot] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
