// tb_vipers_mac_chain: MAC units of 16 lanes connected as one chain of four
// units (MACL=4) and as four chains of one unit (MACL=1). Random vector
// operands are accumulated over several element groups; each chain output
// must equal the sum of the products of the lanes in that chain.
module tb_vipers_mac_chain;
  localparam int VPW = 32, NLANE = 16;
  logic clk = 0, rst_n = 0, mac_en = 0, clear = 0;
  logic [NLANE-1:0] act = 0;
  logic [NLANE-1:0][VPW-1:0] a = '0, b = '0;
  logic [0:0][VPW-1:0] sum1;
  logic [3:0][VPW-1:0] sum4;
  logic [3:0][VPW-1:0] m4 = '0;
  int checks = 0, failures = 0;

  vipers_mac_chain #(.VPW(VPW), .NLANE(NLANE), .MACL(4)) u_one (
    .clk, .rst_n, .mac_en, .clear, .act, .a, .b, .sum(sum1));
  vipers_mac_chain #(.VPW(VPW), .NLANE(NLANE), .MACL(1)) u_four (
    .clk, .rst_n, .mac_en, .clear, .act, .a, .b, .sum(sum4));

  always #5 clk = ~clk;

  initial begin
    #200000;
    $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12 rst_n = 1;
    for (int t = 0; t < 1500; t++) begin
      @(negedge clk);
      checks += 5;
      if (sum1[0] !== m4[0] + m4[1] + m4[2] + m4[3]) begin
        failures++; if (failures < 10) $display("FAIL single chain %h", sum1[0]);
      end
      for (int c = 0; c < 4; c++)
        if (sum4[c] !== m4[c]) begin failures++; if (failures < 10) $display("FAIL chain %0d", c); end
      mac_en = ($urandom % 3 != 0); clear = ($urandom % 12 == 0); act = $urandom;
      for (int l = 0; l < NLANE; l++) begin a[l] = $urandom; b[l] = 32'(int'($urandom % 2000) - 1000); end
      @(posedge clk);
      for (int c = 0; c < 4; c++) begin
        logic [VPW-1:0] p;
        p = 0;
        for (int l = 4 * c; l < 4 * c + 4; l++) if (act[l]) p += a[l] * b[l];
        if (clear) m4[c] = mac_en ? p : '0;
        else if (mac_en) m4[c] += p;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
