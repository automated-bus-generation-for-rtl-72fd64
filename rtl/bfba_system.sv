// BFBA (Bi-FIFO Bus Architecture): N_BAN processors, each in a BAN with its
// own 8 MB SRAM, joined only by point-to-point links to the adjacent BANs:
// a Bi-FIFO and the REGISTERS of each BAN connect to those of the next BAN,
// and the last BAN connects back to the first (A -> B -> C -> D -> A). No
// memory is shared; data moves from BAN to BAN through the Bi-FIFOs, which
// suits a pipelined program where each processor runs one stage.
//
// Per BAN k: Bi-FIFO offset 0x00 talks to BAN k+1, offset 0x08 to BAN k-1
// (see bififo); REGISTERS TO_NEXT/TO_PREV appear in the neighbours as
// FROM_PREV/FROM_NEXT (see registers). The ring topology and four BANs of
// 8 MB follow the generated BFBA system; the link signalling is this
// design's.
module bfba_system
  import bussyn_pkg::*;
#(
  parameter int unsigned N_BAN      = 4,
  parameter int unsigned MEM_AW     = 20,
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic    clk,
  input  logic    rst_n,
  input  pe_req_t pe_i [N_BAN],
  output pe_rsp_t pe_o [N_BAN]
);

  logic [DATA_W-1:0] to_next [N_BAN];
  logic [DATA_W-1:0] to_prev [N_BAN];
  fifo_link_req_t    up_req  [N_BAN];
  fifo_link_rsp_t    dn_rsp  [N_BAN];
  bus_req_t          glb_req [N_BAN];
  bus_rsp_t          rmt_rsp [N_BAN];
  logic [7:0]        ctrl    [N_BAN];
  logic              stall   [N_BAN];

  for (genvar k = 0; k < N_BAN; k++) begin : g_ban
    localparam int unsigned PREV = (k + N_BAN - 1) % N_BAN;
    localparam int unsigned NEXT = (k + 1) % N_BAN;
    ban #(.MEM_AW(MEM_AW), .HAS_REGS(1'b1), .HAS_FIFO(1'b1), .GLOBAL_MODE(0),
          .HAS_RMT(1'b0), .FIFO_DEPTH(FIFO_DEPTH)) u_ban (
      .clk, .rst_n,
      .pe_i(pe_i[k]), .pe_o(pe_o[k]),
      .reg_to_next(to_next[k]), .reg_to_prev(to_prev[k]),
      .reg_from_prev(to_next[PREV]), .reg_from_next(to_prev[NEXT]),
      .reg_ctrl(ctrl[k]),
      .fifo_dn_i(up_req[NEXT]), .fifo_dn_o(dn_rsp[k]),
      .fifo_up_o(up_req[k]),    .fifo_up_i(dn_rsp[PREV]),
      .fifo_stall(stall[k]),
      .glb_o(glb_req[k]), .glb_i(BUS_RSP_IDLE),
      .rmt_i(BUS_REQ_IDLE), .rmt_o(rmt_rsp[k]));
  end

endmodule
