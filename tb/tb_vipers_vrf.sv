// tb_vipers_vrf: fills the register-file partition with random data, reads
// both ports (one-cycle latency) against a shadow copy, and checks that a
// read of the word being written returns the old value.
module tb_vipers_vrf;
  localparam int NVREG = 64, EPL = 4, D = NVREG * EPL;
  logic clk = 0, we = 0;
  logic [7:0] waddr = 0, ra = 0, rb = 0;
  logic [31:0] wdata = 0, da, db;
  logic [31:0] shadow [D];
  int checks = 0, failures = 0;

  vipers_vrf #(.VPW(32), .NVREG(NVREG), .EPL(EPL)) dut (
    .clk, .we, .waddr, .wdata, .raddr_a(ra), .raddr_b(rb), .rdata_a(da), .rdata_b(db));

  always #5 clk = ~clk;

  initial begin
    #200000;
    $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string s, logic [31:0] g, logic [31:0] e);
    checks++;
    if (g !== e) begin failures++; if (failures < 10) $display("FAIL %s got %h exp %h", s, g, e); end
  endtask

  initial begin
    for (int i = 0; i < D; i++) begin
      @(negedge clk); we = 1; waddr = 8'(i); wdata = $urandom; shadow[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      ra = $urandom; rb = $urandom;
      @(negedge clk);
      chk("port a", da, shadow[ra]);
      chk("port b", db, shadow[rb]);
    end
    // read during write returns the old word, the next read the new one
    @(negedge clk); we = 1; waddr = 8'd77; wdata = ~shadow[77]; ra = 8'd77; rb = 8'd77;
    @(negedge clk); we = 0;
    chk("read during write a", da, shadow[77]);
    chk("read during write b", db, shadow[77]);
    shadow[77] = ~shadow[77];
    @(negedge clk);
    chk("read after write", da, shadow[77]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
