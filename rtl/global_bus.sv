// Shared global bus (segment of bus of GBAVIII, Hybrid and the two SplitBA
// subsystems). NM masters share it through a global_arbiter; the granted
// master's request is passed to slave 0 if its address lies in the global
// window (0x4000_0000..0x7fff_ffff) and to slave 1 (when NS = 2) if it lies
// at 0x8000_0000 or above; the slave's response goes back to that master
// only (with ROUTE_ALL every address goes to slave 0; a BAN uses this to
// share its memory interface between its CPU bus and an incoming bridge).
// Other masters see no response and keep waiting. A granted transfer
// to an address with no slave is answered with ack and zero data.
//
// The bus itself adds no register: arbitration costs one cycle (see
// global_arbiter), the rest is the slave's latency.
module global_bus
  import bussyn_pkg::*;
#(
  parameter int unsigned NM = 4,
  parameter int unsigned NS = 1,
  parameter bit          ROUTE_ALL = 1'b0   // every address to slave 0
) (
  input  logic     clk,
  input  logic     rst_n,
  input  bus_req_t m_i [NM],
  output bus_rsp_t m_o [NM],
  output bus_req_t s_o [NS],
  input  bus_rsp_t s_i [NS]
);

  logic [NM-1:0] req, gnt;
  bus_req_t      cur;
  bus_rsp_t      rsp;
  logic          done;
  int unsigned   tgt;
  logic          tgt_ok;

  always_comb
    for (int unsigned m = 0; m < NM; m++) req[m] = m_i[m].req;

  global_arbiter #(.N(NM)) u_arb (.clk, .rst_n, .req, .done, .gnt);

  always_comb begin
    cur = BUS_REQ_IDLE;
    for (int unsigned m = 0; m < NM; m++)
      if (gnt[m]) cur = m_i[m];
    tgt    = (!ROUTE_ALL && decode(cur.addr) == RGN_REMOTE) ? 1 : 0;
    tgt_ok = ROUTE_ALL || (decode(cur.addr) == RGN_GLOBAL)
             || (decode(cur.addr) == RGN_REMOTE && NS > 1);

    for (int unsigned s = 0; s < NS; s++) begin
      s_o[s]     = cur;
      s_o[s].req = cur.req && tgt_ok && (tgt == s);
    end

    rsp = BUS_RSP_IDLE;
    if (!tgt_ok) rsp.ack = cur.req;
    else
      for (int unsigned s = 0; s < NS; s++)
        if (tgt == s) rsp = s_i[s];
    done = rsp.ack || rsp.retry;

    for (int unsigned m = 0; m < NM; m++)
      m_o[m] = gnt[m] ? rsp : BUS_RSP_IDLE;
  end

endmodule
