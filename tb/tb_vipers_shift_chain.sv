// tb_vipers_shift_chain: presents a vector slot by slot the way the lanes
// read it during vupshift (port A: slot s of every lane, port B: slot s+1 of
// lane 0) for random vector lengths, and checks that every element i < VL
// receives element i+1 and element VL-1 receives element 0.
module tb_vipers_shift_chain;
  localparam int VPW = 32, NLANE = 16, MVL = 64;
  logic clk = 0, first = 0;
  logic [7:0] slot = 0;
  logic [15:0] vl = 0;
  logic [NLANE-1:0][VPW-1:0] rd_a = '0, rd_b = '0, nbr;
  logic [VPW-1:0] v [MVL + NLANE];
  int checks = 0, failures = 0;

  vipers_shift_chain #(.VPW(VPW), .NLANE(NLANE)) dut (.clk, .first, .slot, .vl, .rd_a, .rd_b, .nbr);
  always #5 clk = ~clk;

  initial begin
    #200000;
    $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 100; t++) begin
      vl = (t < 4) ? 16'(MVL >> t) : 16'($urandom_range(1, MVL));
      foreach (v[i]) v[i] = $urandom;
      for (int s = 0; s * NLANE < vl; s++) begin
        @(negedge clk);
        first = (s == 0); slot = 8'(s);
        for (int l = 0; l < NLANE; l++) rd_a[l] = v[s * NLANE + l];
        rd_b[0] = v[(s + 1) * NLANE];
        #1;
        for (int l = 0; l < NLANE; l++) begin
          int i;
          i = s * NLANE + l;
          if (i < vl) begin
            checks++;
            if (nbr[l] !== ((i == vl - 1) ? v[0] : v[i + 1])) begin
              failures++; if (failures < 10) $display("FAIL vl=%0d element %0d", vl, i);
            end
          end
        end
        // the operand of the next slot arrives a cycle later; port A of
        // lane 0 now carries something else
        @(negedge clk); first = 0; rd_a = '0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
