// Hybrid bus system: BFBA combined with GBAVIII. Each of the N_BAN BANs has
// a local SRAM, REGISTERS and a Bi-FIFO linked to its neighbours in a ring
// (A -> B -> C -> D -> A), as in BFBA, and a GBI_GB3 onto a global bus with
// a global arbiter and a global memory in BAN G, as in GBAVIII. Adjacent
// processors can pass data quickly through the Bi-FIFOs while all of them
// share data in the global memory at 0x4000_0000.
//
// Sizes: 4 MB local memories and a 16 MB global memory (32 MB in all); the
// split is this design's choice. The combination of the two structures
// follows the generated Hybrid system.
module hybrid_system
  import bussyn_pkg::*;
#(
  parameter int unsigned N_BAN      = 4,
  parameter int unsigned LOCAL_AW   = 19,
  parameter int unsigned GLOBAL_AW  = 21,
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic    clk,
  input  logic    rst_n,
  input  pe_req_t pe_i [N_BAN],
  output pe_rsp_t pe_o [N_BAN]
);

  bus_req_t          g_req   [N_BAN];
  bus_rsp_t          g_rsp   [N_BAN];
  logic [DATA_W-1:0] to_next [N_BAN];
  logic [DATA_W-1:0] to_prev [N_BAN];
  logic [7:0]        ctrl    [N_BAN];
  fifo_link_req_t    up_req  [N_BAN];
  fifo_link_rsp_t    dn_rsp  [N_BAN];
  logic              stall   [N_BAN];
  bus_rsp_t          rmt_rsp [N_BAN];
  bus_req_t          s1_req;

  for (genvar k = 0; k < N_BAN; k++) begin : g_ban
    localparam int unsigned PREV = (k + N_BAN - 1) % N_BAN;
    localparam int unsigned NEXT = (k + 1) % N_BAN;
    ban #(.MEM_AW(LOCAL_AW), .HAS_REGS(1'b1), .HAS_FIFO(1'b1), .GLOBAL_MODE(1),
          .HAS_RMT(1'b0), .FIFO_DEPTH(FIFO_DEPTH)) u_ban (
      .clk, .rst_n,
      .pe_i(pe_i[k]), .pe_o(pe_o[k]),
      .reg_to_next(to_next[k]), .reg_to_prev(to_prev[k]),
      .reg_from_prev(to_next[PREV]), .reg_from_next(to_prev[NEXT]),
      .reg_ctrl(ctrl[k]),
      .fifo_dn_i(up_req[NEXT]), .fifo_dn_o(dn_rsp[k]),
      .fifo_up_o(up_req[k]),    .fifo_up_i(dn_rsp[PREV]),
      .fifo_stall(stall[k]),
      .glb_o(g_req[k]), .glb_i(g_rsp[k]),
      .rmt_i(BUS_REQ_IDLE), .rmt_o(rmt_rsp[k]));
  end

  ban_g #(.NM(N_BAN), .NS(1), .MEM_AW(GLOBAL_AW)) u_ban_g (
    .clk, .rst_n, .m_i(g_req), .m_o(g_rsp), .s1_o(s1_req), .s1_i(BUS_RSP_IDLE));

endmodule
