// vipers_memunit: the vector memory unit (load/store controller with load and
// store address generators).
//
// Executes the vector memory commands queued by the vector controller, one
// at a time and in program order, and the scalar core's data accesses when
// no vector command is pending. Each cycle the address generator takes the
// next run of consecutive elements e, e+1, ... that lie in the same memory
// line, up to a per-cycle limit, and moves them through the crossbars in one
// memory access:
//   loads  (unit or constant stride): up to min(NLANE, MEMW/size) elements
//   stores (unit or constant stride): up to min(NLANE, MEMW/size, MEMW/VPW)
//   indexed loads and stores: one element per cycle
// so a unit-stride word access of VL elements takes VL/4 cycles on a
// 128-bit memory, a stride-2 one VL/2 cycles, as in the architecture's
// performance model. Element e belongs to lane e % NLANE. Store data, and
// the byte offsets of indexed accesses, come from the heads of the lanes'
// store buffers; load data go into the lanes' load buffers, and ld_done
// pulses once the last element of a load is in them. A new load starts only
// when every load buffer is empty (the previous load has been written back).
//
// Memory timing: the main memory reads synchronously, so load data are
// aligned and pushed one cycle after the access. Scalar loads answer with
// s_rvalid one cycle after s_gnt. The architecture's fixed issue overhead
// (C = 4 cycles per vector memory instruction) is not modelled: a command
// starts the cycle after it is queued. Element-count limits and crossbar
// structure follow the architecture; the command format, the scalar port
// handshake and the byte-offset meaning of index values are this design's.
module vipers_memunit
  import vipers_pkg::*;
#(
  parameter int unsigned NLANE   = 16,
  parameter int unsigned VPW     = 32,
  parameter int unsigned MEMW    = 128,
  parameter int unsigned MEMMINW = 8,
  parameter int unsigned DEPTH   = 6144,
  localparam int unsigned NU     = MEMW / MEMMINW,
  localparam int unsigned NEL    = (NLANE < NU) ? NLANE : NU,
  localparam int unsigned NES0   = MEMW / VPW,
  localparam int unsigned NES    = (NLANE < NES0) ? NLANE : NES0,
  localparam int unsigned LW     = (NLANE <= 1) ? 1 : $clog2(NLANE)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // command queue from the vector controller
  input  logic                      cmd_valid,
  input  memcmd_t                   cmd,
  output logic                      cmd_pop,
  // store buffers (heads) of every lane
  input  logic [NLANE-1:0]          sb_empty,
  input  logic [NLANE-1:0][VPW-1:0] sb_data,
  input  logic [NLANE-1:0][VPW-1:0] sb_off,
  output logic [NLANE-1:0]          sb_pop,
  // load buffers of every lane
  input  logic                      lb_empty_all,
  output logic [NLANE-1:0]          lb_push,
  output logic [NLANE-1:0][VPW-1:0] lb_data,
  output logic                      ld_done,
  // scalar core data port
  input  logic                      s_req,
  input  logic                      s_we,
  input  msize_e                    s_size,
  input  logic [31:0]               s_addr,
  input  logic [31:0]               s_wdata,
  output logic                      s_gnt,
  output logic                      s_rvalid,
  output logic [31:0]               s_rdata,
  // main memory
  output logic [$clog2(DEPTH)-1:0]  mem_addr,
  output logic                      mem_we,
  output logic [NU-1:0]             mem_uen,
  output logic [MEMW-1:0]           mem_wdata,
  input  logic [MEMW-1:0]           mem_rdata,
  output logic                      busy
);
  localparam int unsigned LB = $clog2(MEMW / 8);     // byte offset bits in a line
  localparam int unsigned UB = MEMMINW / 8;          // bytes per crossbar unit
  localparam int unsigned UW = (NU <= 1) ? 1 : $clog2(NU);

  // active command
  logic        act;
  memcmd_t     c;
  logic [15:0] e;
  logic [31:0] addr_e;
  logic [LW-1:0] lane0;

  // load data pending (memory read in flight)
  logic                  p_valid, p_scalar, p_last, p_sext;
  msize_e                p_size;
  logic [LW-1:0]         p_lane0;
  logic [$clog2(NEL+1)-1:0] p_k;
  logic [NEL-1:0][UW-1:0] p_off;

  // per-cycle element run
  logic [31:0]            sbytes, lim;
  logic [NEL-1:0][31:0]   addr_j;
  logic [NEL-1:0][LW-1:0] lane_j;
  logic [NEL-1:0]         ok;
  logic [$clog2(NEL+1)-1:0] k;
  logic                   fire, start, s_fire;

  // crossbars
  logic [NES-1:0]          wx_valid;
  logic [NES-1:0][VPW-1:0] wx_data;
  logic [NES-1:0][UW-1:0]  wx_off;
  msize_e                  wx_size;
  logic [NEL-1:0][VPW-1:0] rx_elem;

  function automatic logic [UW-1:0] uoff(logic [31:0] a);
    return UW'(a[LB-1:0] / LB'(UB));
  endfunction

  assign start = !act && cmd_valid && (cmd.store || (lb_empty_all && !p_valid));
  assign cmd_pop = start;
  assign s_fire  = !act && !cmd_valid && !p_valid && s_req;
  assign s_gnt   = s_fire;
  assign busy    = act || p_valid;

  // element run of this cycle
  always_comb begin
    sbytes = (c.mode == AM_UNIT) ? (32'd1 << c.size) : (c.stride << c.size);
    if (c.mode == AM_INDEX)
      lim = 1;
    else if (c.store)
      lim = ((MEMW >> (3 + c.size)) < NES) ? (MEMW >> (3 + c.size)) : NES;
    else
      lim = ((MEMW >> (3 + c.size)) < NEL) ? (MEMW >> (3 + c.size)) : NEL;
    k = '0;
    for (int j = 0; j < int'(NEL); j++) begin
      lane_j[j] = LW'(lane0 + LW'(j));
      if (c.mode == AM_INDEX) addr_j[j] = c.base + sb_off[lane_j[j]];
      else                    addr_j[j] = addr_e + 32'(j) * sbytes;
      ok[j] = act && (32'(j) < lim) && (32'(e) + 32'(j) < 32'(c.vl))
              && (addr_j[j][31:LB] == addr_j[0][31:LB])
              && ((c.store || c.mode == AM_INDEX) ? !sb_empty[lane_j[j]] : 1'b1);
      if (j > 0) ok[j] = ok[j] && ok[j-1];
      if (ok[j]) k = k + 1'b1;
    end
    fire = (k != 0);
  end

  // write crossbar inputs: vector store run or scalar store
  always_comb begin
    wx_valid = '0;
    wx_data  = '0;
    wx_off   = '0;
    wx_size  = c.size;
    if (s_fire) begin
      wx_valid[0] = s_we;
      wx_data[0]  = VPW'(s_wdata);
      wx_off[0]   = uoff(s_addr);
      wx_size     = s_size;
    end else begin
      for (int j = 0; j < int'(NES); j++) begin
        wx_valid[j] = ok[j] && c.store;
        wx_data[j]  = sb_data[lane_j[j]];
        wx_off[j]   = uoff(addr_j[j]);
      end
    end
  end

  vipers_wr_xbar #(.MEMW(MEMW), .MEMMINW(MEMMINW), .VPW(VPW), .NE(NES)) u_wx (
    .valid(wx_valid), .data(wx_data), .off(wx_off), .size(wx_size),
    .line(mem_wdata), .uen(mem_uen)
  );

  vipers_rd_xbar #(.MEMW(MEMW), .MEMMINW(MEMMINW), .VPW(VPW), .NE(NEL)) u_rx (
    .line(mem_rdata), .off(p_off), .size(p_size), .sext(p_sext), .elem(rx_elem)
  );

  assign mem_addr = s_fire ? $clog2(DEPTH)'(s_addr[31:LB]) : $clog2(DEPTH)'(addr_j[0][31:LB]);
  assign mem_we   = s_fire ? s_we : (fire && c.store);

  always_comb begin
    sb_pop = '0;
    if (fire && (c.store || c.mode == AM_INDEX))
      for (int j = 0; j < int'(NEL); j++)
        if (ok[j]) sb_pop[lane_j[j]] = 1'b1;
  end

  // load data: one cycle after the access
  always_comb begin
    lb_push = '0;
    lb_data = '0;
    for (int l = 0; l < int'(NLANE); l++) begin
      logic [LW-1:0] j;
      j = LW'(LW'(l) - p_lane0);
      if (p_valid && !p_scalar && 32'(j) < 32'(p_k)) begin
        lb_push[l] = 1'b1;
        lb_data[l] = rx_elem[j];
      end
    end
  end
  assign ld_done  = (p_valid && !p_scalar && p_last) || (start && !cmd.store && cmd.vl == 0);
  assign s_rvalid = p_valid && p_scalar;
  assign s_rdata  = 32'(rx_elem[0]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      act     <= 1'b0;
      c       <= '0;
      e       <= '0;
      addr_e  <= '0;
      lane0   <= '0;
      p_valid <= 1'b0;
      p_scalar<= 1'b0;
      p_last  <= 1'b0;
      p_sext  <= 1'b0;
      p_size  <= SZ_W;
      p_lane0 <= '0;
      p_k     <= '0;
      p_off   <= '0;
    end else begin
      p_valid <= 1'b0;
      if (start) begin
        act    <= (cmd.vl != 0);
        c      <= cmd;
        e      <= '0;
        addr_e <= cmd.base;
        lane0  <= '0;
      end else if (s_fire) begin
        if (!s_we) begin
          p_valid  <= 1'b1;
          p_scalar <= 1'b1;
          p_size   <= s_size;
          p_sext   <= 1'b0;
          p_k      <= 1;
          p_off    <= '0;
          p_off[0] <= uoff(s_addr);
        end
      end else if (fire) begin
        e      <= e + 16'(k);
        addr_e <= addr_e + 32'(k) * sbytes;
        lane0  <= LW'(lane0 + LW'(k));
        if (32'(e) + 32'(k) >= 32'(c.vl)) act <= 1'b0;
        if (!c.store) begin
          p_valid  <= 1'b1;
          p_scalar <= 1'b0;
          p_last   <= (32'(e) + 32'(k) >= 32'(c.vl));
          p_size   <= c.size;
          p_sext   <= c.sext;
          p_k      <= k;
          p_lane0  <= lane0;
          for (int j = 0; j < int'(NEL); j++) p_off[j] <= uoff(addr_j[j]);
        end
      end
    end
  end

  // a vector memory command never starts while another is active
  a_one_cmd: assert property (@(posedge clk) disable iff (!rst_n) cmd_pop |-> !act);
endmodule
