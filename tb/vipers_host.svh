// vipers_host.svh: scalar-core side of the kernel testbenches, included
// inside a testbench module that has imported vipers_pkg and
// vipers_asm_pkg and defined localparam WATCHDOG (cycles).
//
// Declares the signals of vipers_top, instantiates it with its default
// parameters, runs the clock and reset, and provides the tasks a scalar
// program uses: send (vector instruction with scalar operand), get_res
// (scalar result queue), wait_idle, swrite/sread (scalar data port,
// size 0 byte, 1 half, 2 word), setcr (vmstc) and check. Inputs change just
// after the falling clock edge, and handshakes are sampled there.
  logic        clk = 1'b0, rst_n = 1'b0;
  logic        instr_valid = 1'b0, instr_ready;
  logic [31:0] instr = '0, instr_scalar = '0;
  logic        sres_valid, sres_ready = 1'b0;
  logic [31:0] sres_data;
  logic        smem_req = 1'b0, smem_we = 1'b0, smem_gnt, smem_rvalid;
  logic [1:0]  smem_size = 2'd2;
  logic [31:0] smem_addr = '0, smem_wdata = '0, smem_rdata;
  logic        idle;
  int          checks = 0, failures = 0;
  longint      cyc = 0;

  vipers_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  initial #22 rst_n = 1'b1;

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(input logic [31:0] ins, input logic [31:0] sc = 0);
    @(negedge clk);
    instr = ins; instr_scalar = sc; instr_valid = 1'b1;
    while (!instr_ready) @(negedge clk);
    @(negedge clk);
    instr_valid = 1'b0;
  endtask

  task automatic get_res(output logic [31:0] d);
    @(negedge clk);
    while (!sres_valid) @(negedge clk);
    d = sres_data;
    sres_ready = 1'b1;
    @(negedge clk);
    sres_ready = 1'b0;
  endtask

  task automatic wait_idle();
    @(negedge clk);
    while (!idle) @(negedge clk);
  endtask

  task automatic swrite(input logic [31:0] a, input logic [31:0] d, input int sz = 2);
    @(negedge clk);
    smem_req = 1'b1; smem_we = 1'b1; smem_addr = a; smem_wdata = d; smem_size = 2'(sz);
    while (!smem_gnt) @(negedge clk);
    @(negedge clk);
    smem_req = 1'b0; smem_we = 1'b0;
  endtask

  task automatic sread(input logic [31:0] a, output logic [31:0] d, input int sz = 2);
    @(negedge clk);
    smem_req = 1'b1; smem_we = 1'b0; smem_addr = a; smem_size = 2'(sz);
    while (!smem_gnt) @(negedge clk);
    @(negedge clk);
    smem_req = 1'b0;
    while (!smem_rvalid) @(negedge clk);
    d = smem_rdata;
  endtask

  task automatic setcr(input int cr, input logic [31:0] v);
    send(vctrl(C_MSTC, 0, cr), v);
  endtask

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask
