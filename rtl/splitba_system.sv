// SplitBA (Split Bus Architecture): two bus subsystems, each with two
// processors whose CBIs sit directly on a shared bus together with a global
// arbiter and a 16 MB global memory, joined by a bus bridge. Each subsystem
// runs on its own bus, so the two pairs of processors do not compete for
// one bus; a processor reaches its own subsystem's memory at 0x4000_0000
// and the other subsystem's memory at 0x8000_0000 through the bridge.
//
// The bridge is two one-way bus_bridge instances. On each bus the bridge is
// slave 1 (for 0x8xxx_xxxx) and master 2 (for transfers from the other
// side). If both directions were accepted at once, each would wait for a bus
// the other side holds; so a transfer arriving while the opposite direction
// is busy (or is being accepted in the same cycle: direction 1->2 wins) is
// answered with retry, which frees the bus for the bridge. Processor ports
// 0,1 belong to subsystem 1 (BAN A, B), 2,3 to subsystem 2 (BAN C, D).
// N_PE_SUB sets the processors per subsystem (2 in the four-processor
// system); with more, ports 0..N_PE_SUB-1 are subsystem 1 and the rest
// subsystem 2, and each global arbiter grows to N_PE_SUB + 1 masters.
// The structure follows the generated SplitBA system; memory split, address
// map and retry rule are this design's choices.
module splitba_system
  import bussyn_pkg::*;
#(
  parameter int unsigned GLOBAL_AW = 21,
  parameter int unsigned N_PE_SUB  = 2
) (
  input  logic    clk,
  input  logic    rst_n,
  input  pe_req_t pe_i [2*N_PE_SUB],
  output pe_rsp_t pe_o [2*N_PE_SUB]
);

  // masters 0..N_PE_SUB-1 of each bus are CBIs, master N_PE_SUB the bridge
  bus_req_t m_req [2][N_PE_SUB+1];
  bus_rsp_t m_rsp [2][N_PE_SUB+1];
  bus_req_t br_s_req [2];   // slave side of the bridge on subsystem i
  bus_rsp_t br_s_rsp [2];
  logic     br_busy  [2];   // index = source subsystem
  logic     blk      [2];

  for (genvar p = 0; p < 2*N_PE_SUB; p++) begin : g_cbi
    cbi_mpc755 u_cbi (
      .clk, .rst_n, .pe_i(pe_i[p]), .pe_o(pe_o[p]),
      .bus_o(m_req[p/N_PE_SUB][p%N_PE_SUB]), .bus_i(m_rsp[p/N_PE_SUB][p%N_PE_SUB]));
  end

  for (genvar i = 0; i < 2; i++) begin : g_sub
    ban_g #(.NM(N_PE_SUB+1), .NS(2), .MEM_AW(GLOBAL_AW)) u_ban_g (
      .clk, .rst_n, .m_i(m_req[i]), .m_o(m_rsp[i]),
      .s1_o(br_s_req[i]), .s1_i(br_s_rsp[i]));

    // bridge from subsystem i to subsystem 1-i: 0x8xxx_xxxx -> 0x4xxx_xxxx
    bus_bridge #(.ADDR_MASK(32'h0fff_ffff), .ADDR_SET(32'h4000_0000)) u_bridge (
      .clk, .rst_n, .en(1'b1), .block(blk[i]),
      .s_i(br_s_req[i]), .s_o(br_s_rsp[i]),
      .m_o(m_req[1-i][N_PE_SUB]), .m_i(m_rsp[1-i][N_PE_SUB]),
      .busy(br_busy[i]));
  end

  assign blk[0] = br_busy[1];
  assign blk[1] = br_busy[0] || br_s_req[0].req;

endmodule
