// tb_vipers_wr_xbar: random sets of non-overlapping, aligned elements of
// each size; checks the assembled line and the byte enables.
module tb_vipers_wr_xbar;
  import vipers_pkg::*;
  localparam int NE = 4;
  logic [NE-1:0] valid;
  logic [NE-1:0][31:0] data;
  logic [NE-1:0][3:0] off;
  msize_e size;
  logic [127:0] line;
  logic [15:0] uen;
  int checks = 0, failures = 0;

  vipers_wr_xbar #(.MEMW(128), .MEMMINW(8), .VPW(32), .NE(NE)) dut (.valid, .data, .off, .size, .line, .uen);

  initial begin
    #100000;
    $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 1000; t++) begin
      logic [127:0] eline; logic [15:0] euen;
      int nb, nslot, perm[$];
      size = msize_e'(t % 3); nb = 1 << size; nslot = 16 / nb;
      perm.delete();
      for (int s = 0; s < nslot; s++) perm.push_back(s);
      perm.shuffle();
      eline = 0; euen = 0;
      for (int j = 0; j < NE; j++) begin
        valid[j] = $urandom; data[j] = $urandom; off[j] = 4'(perm[j] * nb);
        if (valid[j])
          for (int k = 0; k < nb; k++) begin
            eline[8 * (off[j] + k) +: 8] = data[j][8 * k +: 8];
            euen[off[j] + k] = 1'b1;
          end
      end
      #1;
      checks += 2;
      if (uen !== euen) begin failures++; if (failures < 10) $display("FAIL uen %h exp %h", uen, euen); end
      if ((line & {16{8'hFF}} & expand(euen)) !== (eline & expand(euen))) begin
        failures++; if (failures < 10) $display("FAIL line %h exp %h", line, eline);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [127:0] expand(logic [15:0] e);
    for (int u = 0; u < 16; u++) expand[8 * u +: 8] = {8{e[u]}};
  endfunction
endmodule
