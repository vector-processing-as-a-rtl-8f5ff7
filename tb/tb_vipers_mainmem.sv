// tb_vipers_mainmem: random full-line and partial (byte-enable) writes to a
// small memory and synchronous reads checked against a shadow copy.
module tb_vipers_mainmem;
  localparam int DEPTH = 64;
  logic clk = 0, we = 0;
  logic [5:0] addr = 0;
  logic [15:0] uen = 0;
  logic [127:0] wdata = 0, rdata;
  logic [127:0] shadow [DEPTH];
  int checks = 0, failures = 0;

  vipers_mainmem #(.MEMW(128), .MEMMINW(8), .DEPTH(DEPTH)) dut (.clk, .addr, .we, .uen, .wdata, .rdata);
  always #5 clk = ~clk;

  initial begin
    #200000;
    $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk); we = 1; addr = 6'(i); uen = '1; wdata = {$urandom, $urandom, $urandom, $urandom};
      shadow[i] = wdata;
    end
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      if (t > 0 && !we) begin
        checks++;
        if (rdata !== shadow[addr]) begin failures++; if (failures < 10) $display("FAIL line %0d", addr); end
      end
      if (we || $urandom % 2) begin
        we = 0; addr = $urandom;                  // read, checked next cycle
      end else begin
        we = 1; addr = $urandom; uen = $urandom; wdata = {$urandom, $urandom, $urandom, $urandom};
        for (int u = 0; u < 16; u++) if (uen[u]) shadow[addr][8 * u +: 8] = wdata[8 * u +: 8];
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
