// BAN G: the global-memory node of a shared bus. It holds the global bus
// with its global arbiter (NM masters), the memory-bus interface and the
// global SRAM of 2**MEM_AW 64-bit words, seen by every master in the global
// window from 0x4000_0000. With NS = 2 the bus has a second slave port,
// brought out as s1_o/s1_i, for addresses from 0x8000_0000 (the SplitBA bus
// bridge).
//
// An uncontended read takes 3 cycles from the master's request to its ack:
// one for arbitration, one for the SRAM access, one returning the data.
module ban_g
  import bussyn_pkg::*;
#(
  parameter int unsigned NM     = 4,
  parameter int unsigned NS     = 1,
  parameter int unsigned MEM_AW = 21
) (
  input  logic     clk,
  input  logic     rst_n,
  input  bus_req_t m_i [NM],
  output bus_rsp_t m_o [NM],
  output bus_req_t s1_o,
  input  bus_rsp_t s1_i
);

  bus_req_t          s_o [NS];
  bus_rsp_t          s_i [NS];
  logic              sram_cs, sram_we;
  logic [BE_W-1:0]   sram_be;
  logic [MEM_AW-1:0] sram_addr;
  logic [DATA_W-1:0] sram_din, sram_dout;

  global_bus #(.NM(NM), .NS(NS)) u_gbus (.clk, .rst_n, .m_i, .m_o, .s_o, .s_i);

  mbi_sram #(.MEM_AW(MEM_AW)) u_mbi (
    .clk, .rst_n, .bus_i(s_o[0]), .sel(1'b1), .bus_o(s_i[0]),
    .sram_cs, .sram_we, .sram_be, .sram_addr, .sram_din, .sram_dout);

  sram #(.ADDR_W(MEM_AW), .DATA_W(DATA_W)) u_sram (
    .clk, .sram_cs, .sram_we, .sram_be, .sram_addr, .sram_din, .sram_dout);

  if (NS > 1) begin : g_s1
    assign s1_o    = s_o[1];
    assign s_i[1]  = s1_i;
  end else begin : g_nos1
    assign s1_o = BUS_REQ_IDLE;
  end

endmodule
