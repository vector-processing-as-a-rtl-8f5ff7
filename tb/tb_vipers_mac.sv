// tb_vipers_mac: one MAC unit (four lanes). Random signed products with
// random lane activity are accumulated over several cycles; checks the
// accumulator, the clear (with and without a same-cycle product) and the
// chain adder output.
module tb_vipers_mac;
  localparam int VPW = 32, ACCW = 64;
  logic clk = 0, rst_n = 0, mac_en = 0, clear = 0;
  logic [3:0] act = 0;
  logic [3:0][VPW-1:0] a = '0, b = '0;
  logic [ACCW-1:0] chain_in = 0, chain_out, acc;
  logic [ACCW-1:0] model = 0;
  int checks = 0, failures = 0;

  vipers_mac #(.VPW(VPW), .LPM(4), .ACCW(ACCW)) dut (.clk, .rst_n, .mac_en, .clear, .act, .a, .b,
                                                  .chain_in, .chain_out, .acc);
  always #5 clk = ~clk;

  initial begin
    #200000;
    $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [ACCW-1:0] psum();
    logic [ACCW-1:0] s = 0;
    for (int i = 0; i < 4; i++)
      if (act[i]) s += ACCW'($signed(a[i]) * $signed(b[i]));
    return s;
  endfunction

  initial begin
    #12 rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      checks += 2;
      if (acc !== model) begin failures++; if (failures < 10) $display("FAIL acc %h exp %h", acc, model); end
      if (chain_out !== chain_in + model) failures++;
      mac_en = ($urandom % 4 != 0); clear = ($urandom % 16 == 0);
      act = $urandom; chain_in = {$urandom, $urandom};
      for (int i = 0; i < 4; i++) begin
        a[i] = (t % 3 == 0) ? 32'(int'($urandom % 200) - 100) : $urandom;
        b[i] = $urandom;
      end
      @(posedge clk);
      if (clear) model = mac_en ? psum() : '0;
      else if (mac_en) model = model + psum();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
