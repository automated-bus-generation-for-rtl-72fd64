// CPU bus of a BAN (a segment of bus with one master, the CBI). It decodes
// the master's address and routes the transfer to one slave: the local
// memory interface, the REGISTERS, the Bi-FIFO or the global port (GBI_GB3,
// a bus bridge, or in SplitBA the other subsystem). Each slave sees the
// master's request with its own req gated by the decode; the selected
// slave's response goes back unchanged, so the bus adds no cycle.
//
// A transfer to a region whose slave is absent (HAS_* = 0) or to an unused
// region is answered by the bus itself with ack and zero data one cycle
// after req, so that a stray access cannot hang the processor. That rule and
// the address map (see bussyn_pkg) are this design's choices.
module cpu_bus
  import bussyn_pkg::*;
#(
  parameter bit HAS_REGS   = 1'b1,
  parameter bit HAS_FIFO   = 1'b1,
  parameter bit HAS_GLOBAL = 1'b1
) (
  input  logic     clk,
  input  logic     rst_n,
  input  bus_req_t m_i,
  output bus_rsp_t m_o,
  output bus_req_t mem_o,
  input  bus_rsp_t mem_i,
  output bus_req_t regs_o,
  input  bus_rsp_t regs_i,
  output bus_req_t fifo_o,
  input  bus_rsp_t fifo_i,
  output bus_req_t glb_o,
  input  bus_rsp_t glb_i
);

  region_e rgn;
  logic    to_mem, to_regs, to_fifo, to_glb, to_none;
  logic    none_ack;

  always_comb begin
    rgn     = decode(m_i.addr);
    to_mem  = (rgn == RGN_LOCAL);
    to_regs = HAS_REGS   && (rgn == RGN_REGS);
    to_fifo = HAS_FIFO   && (rgn == RGN_FIFO);
    to_glb  = HAS_GLOBAL && (rgn == RGN_GLOBAL || rgn == RGN_REMOTE);
    to_none = !(to_mem || to_regs || to_fifo || to_glb);

    mem_o  = m_i;  mem_o.req  = m_i.req && to_mem;
    regs_o = m_i;  regs_o.req = m_i.req && to_regs;
    fifo_o = m_i;  fifo_o.req = m_i.req && to_fifo;
    glb_o  = m_i;  glb_o.req  = m_i.req && to_glb;

    m_o = BUS_RSP_IDLE;
    if (to_mem)       m_o = mem_i;
    else if (to_regs) m_o = regs_i;
    else if (to_fifo) m_o = fifo_i;
    else if (to_glb)  m_o = glb_i;
    else              m_o.ack = none_ack;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) none_ack <= 1'b0;
    else        none_ack <= m_i.req && to_none && !none_ack;
  end

  // Master rule: a pending request keeps its fields until ack or retry.
  a_req_stable: assert property (@(posedge clk) disable iff (!rst_n)
    m_i.req && !m_o.ack && !m_o.retry |=> m_i.req && $stable(m_i.addr) && $stable(m_i.we));

endmodule
