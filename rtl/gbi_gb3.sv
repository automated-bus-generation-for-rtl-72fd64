// GBI_GB3: generic bus interface between a BAN's CPU bus and the global bus
// of GBAVIII and Hybrid. Transfers that the CPU bus routes here (the global
// window, 0x4000_0000..0x7fff_ffff) are taken over by the interface and run
// on the global bus, where the interface is one of the masters competing
// through the global arbiter. The response comes back on the CPU bus one
// cycle after the global bus answers; a global-bus retry is re-issued by
// the interface and never reaches the CPU bus. Addresses pass unchanged.
// The bus method names this interface only; building it from an
// always-enabled bus bridge is this design's choice.
module gbi_gb3
  import bussyn_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  bus_req_t s_i,
  output bus_rsp_t s_o,
  output bus_req_t m_o,
  input  bus_rsp_t m_i
);

  logic busy;

  bus_bridge u_fwd (
    .clk, .rst_n,
    .en(1'b1), .block(1'b0),
    .s_i, .s_o, .m_o, .m_i,
    .busy);

endmodule
