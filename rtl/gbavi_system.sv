// GBAVI (Global Bus Architecture version I): N_BAN BANs, each with its own
// 8 MB SRAM and REGISTERS, on a global bus that bus bridges cut into one
// segment per BAN. Bridge BB_(2k+1) joins BAN k's CPU bus to its segment,
// bridge BB_(2k+2) joins that segment to the next BAN (the last back to the
// first), so with both bridges enabled a processor reaches the memory of
// the next BAN: a CPU-bus access to 0x4000_0000 + x becomes an access to
// address x of the next BAN's SRAM. Bits 0 and 1 of a BAN's REGISTERS CTRL
// word enable its two bridges; with a bridge disabled the access waits.
// Inside the next BAN the incoming transfer shares the memory interface
// with that BAN's own processor, one transfer at a time.
//
// Following the generated system: four BANs, eight bridges, the ring of
// segments and the REGISTERS ring. This design's choices: transfers run in
// one direction round the ring (to the next BAN), which keeps the ring free
// of deadlock, and the incoming path enters the memory interface directly
// rather than taking over the other BAN's CPU bus.
module gbavi_system
  import bussyn_pkg::*;
#(
  parameter int unsigned N_BAN  = 4,
  parameter int unsigned MEM_AW = 20
) (
  input  logic    clk,
  input  logic    rst_n,
  input  pe_req_t pe_i [N_BAN],
  output pe_rsp_t pe_o [N_BAN]
);

  logic [DATA_W-1:0] to_next [N_BAN];
  logic [DATA_W-1:0] to_prev [N_BAN];
  logic [7:0]        ctrl    [N_BAN];
  fifo_link_req_t    up_req  [N_BAN];
  fifo_link_rsp_t    dn_rsp  [N_BAN];
  logic              stall   [N_BAN];
  bus_req_t          cpu_glb_req [N_BAN];   // CPU bus k -> BB_(2k+1)
  bus_rsp_t          cpu_glb_rsp [N_BAN];
  bus_req_t          seg_req [N_BAN];       // segment k: BB_(2k+1) -> BB_(2k+2)
  bus_rsp_t          seg_rsp [N_BAN];
  bus_req_t          rmt_req [N_BAN];       // BB_(2k+2) -> memory of BAN k+1
  bus_rsp_t          rmt_rsp [N_BAN];
  logic              bb_busy [2*N_BAN];

  for (genvar k = 0; k < N_BAN; k++) begin : g_ban
    localparam int unsigned PREV = (k + N_BAN - 1) % N_BAN;
    localparam int unsigned NEXT = (k + 1) % N_BAN;

    ban #(.MEM_AW(MEM_AW), .HAS_REGS(1'b1), .HAS_FIFO(1'b0), .GLOBAL_MODE(2),
          .HAS_RMT(1'b1)) u_ban (
      .clk, .rst_n,
      .pe_i(pe_i[k]), .pe_o(pe_o[k]),
      .reg_to_next(to_next[k]), .reg_to_prev(to_prev[k]),
      .reg_from_prev(to_next[PREV]), .reg_from_next(to_prev[NEXT]),
      .reg_ctrl(ctrl[k]),
      .fifo_dn_i('0), .fifo_dn_o(dn_rsp[k]),
      .fifo_up_o(up_req[k]), .fifo_up_i('{rdata: '0, empty: 1'b1, full: 1'b1}),
      .fifo_stall(stall[k]),
      .glb_o(cpu_glb_req[k]), .glb_i(cpu_glb_rsp[k]),
      .rmt_i(rmt_req[PREV]), .rmt_o(rmt_rsp[PREV]));

    // BB_(2k+1): CPU bus k <-> segment k
    bus_bridge u_bb_cpu (
      .clk, .rst_n, .en(ctrl[k][0]), .block(1'b0),
      .s_i(cpu_glb_req[k]), .s_o(cpu_glb_rsp[k]),
      .m_o(seg_req[k]), .m_i(seg_rsp[k]),
      .busy(bb_busy[2*k]));

    // BB_(2k+2): segment k <-> BAN k+1, global window mapped onto its SRAM
    bus_bridge #(.ADDR_MASK(32'h0fff_ffff), .ADDR_SET(32'h0000_0000)) u_bb_seg (
      .clk, .rst_n, .en(ctrl[k][1]), .block(1'b0),
      .s_i(seg_req[k]), .s_o(seg_rsp[k]),
      .m_o(rmt_req[k]), .m_i(rmt_rsp[k]),
      .busy(bb_busy[2*k+1]));
  end

endmodule
