// GBAVIII (Global Bus Architecture version III): N_BAN BANs, each with a
// local SRAM for its processor's program and local data, and one global
// bus that connects every BAN, through its GBI_GB3, to a global memory in
// BAN G under a global arbiter. A processor reaches its local SRAM at
// 0x0000_0000 and the shared global memory at 0x4000_0000.
//
// Sizes: the four local memories of 4 MB and the global memory of 16 MB add
// up to 32 MB; the split between local and global memory is this design's
// choice. Structure (local memories, GBI per BAN, global arbiter, global
// memory) follows the generated GBAVIII system.
module gbaviii_system
  import bussyn_pkg::*;
#(
  parameter int unsigned N_BAN     = 4,
  parameter int unsigned LOCAL_AW  = 19,
  parameter int unsigned GLOBAL_AW = 21
) (
  input  logic    clk,
  input  logic    rst_n,
  input  pe_req_t pe_i [N_BAN],
  output pe_rsp_t pe_o [N_BAN]
);

  bus_req_t          g_req [N_BAN];
  bus_rsp_t          g_rsp [N_BAN];
  logic [DATA_W-1:0] to_next [N_BAN];
  logic [DATA_W-1:0] to_prev [N_BAN];
  logic [7:0]        ctrl    [N_BAN];
  fifo_link_req_t    up_req  [N_BAN];
  fifo_link_rsp_t    dn_rsp  [N_BAN];
  logic              stall   [N_BAN];
  bus_rsp_t          rmt_rsp [N_BAN];
  bus_req_t          s1_req;

  for (genvar k = 0; k < N_BAN; k++) begin : g_ban
    ban #(.MEM_AW(LOCAL_AW), .HAS_REGS(1'b0), .HAS_FIFO(1'b0), .GLOBAL_MODE(1),
          .HAS_RMT(1'b0)) u_ban (
      .clk, .rst_n,
      .pe_i(pe_i[k]), .pe_o(pe_o[k]),
      .reg_to_next(to_next[k]), .reg_to_prev(to_prev[k]),
      .reg_from_prev('0), .reg_from_next('0), .reg_ctrl(ctrl[k]),
      .fifo_dn_i('0), .fifo_dn_o(dn_rsp[k]),
      .fifo_up_o(up_req[k]), .fifo_up_i('{rdata: '0, empty: 1'b1, full: 1'b1}),
      .fifo_stall(stall[k]),
      .glb_o(g_req[k]), .glb_i(g_rsp[k]),
      .rmt_i(BUS_REQ_IDLE), .rmt_o(rmt_rsp[k]));
  end

  ban_g #(.NM(N_BAN), .NS(1), .MEM_AW(GLOBAL_AW)) u_ban_g (
    .clk, .rst_n, .m_i(g_req), .m_o(g_rsp), .s1_o(s1_req), .s1_i(BUS_RSP_IDLE));

endmodule
