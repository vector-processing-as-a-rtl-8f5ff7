// tb_vipers_fifo: random pushes and pops (never beyond full or empty)
// against a queue model; checks data order, count, empty and full.
module tb_vipers_fifo;
  localparam int D = 5;
  logic clk = 0, rst_n = 0, push = 0, pop = 0, empty, full;
  logic [15:0] wdata = 0, rdata;
  logic [2:0] count;
  logic [15:0] q[$];
  int checks = 0, failures = 0;

  vipers_fifo #(.W(16), .DEPTH(D)) dut (.clk, .rst_n, .push, .wdata, .pop, .rdata, .empty, .full, .count);
  always #5 clk = ~clk;

  initial begin
    #200000;
    $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12 rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      checks++;
      if (count !== 3'(q.size()) || empty !== (q.size() == 0) || full !== (q.size() == D)) begin
        failures++; if (failures < 10) $display("FAIL count %0d model %0d", count, q.size());
      end
      if (q.size() > 0) begin
        checks++;
        if (rdata !== q[0]) begin failures++; if (failures < 10) $display("FAIL data %h exp %h", rdata, q[0]); end
      end
      pop  = (q.size() > 0) && ($urandom % 3 != 0);
      push = (q.size() < D || pop) && ($urandom % 2 == 0);
      wdata = $urandom;
      @(posedge clk);
      if (pop) void'(q.pop_front());
      if (push) q.push_back(wdata);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
