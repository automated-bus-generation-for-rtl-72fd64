// Bus Access Node (BAN): one processor port with its bus hardware. Always
// present: the CPU/PE-bus interface (CBI), the CPU bus, the memory-bus
// interface (MBI) and the local SRAM holding the processor's program and
// data. Depending on the bus system:
//   HAS_REGS     REGISTERS, linked to the neighbouring BANs (BFBA, GBAVI, Hybrid)
//   HAS_FIFO     Bi-FIFO towards the next BAN (BFBA, Hybrid)
//   GLOBAL_MODE  0: no global port
//                1: GBI_GB3 to the global bus (GBAVIII, Hybrid)
//                2: the CPU bus's global window is brought out unchanged,
//                   for the BAN's bus bridge (GBAVI)
//   HAS_RMT      a second master port into the MBI (GBAVI: transfers from
//                the previous BAN's bridge), arbitrated per transfer with
//                the CPU bus, round robin, so that neither side can hold
//                the memory while it waits for something else
// Latency seen by the processor (ts to ta, cycles): 3 for the local SRAM,
// REGISTERS and a Bi-FIFO access that need not wait; 4 for the local SRAM
// when HAS_RMT puts the arbiter in front of it; 6 for an uncontended read
// of the global memory through the GBI (3 of them on the global bus).
module ban
  import bussyn_pkg::*;
#(
  parameter int unsigned MEM_AW      = 20,
  parameter bit          HAS_REGS    = 1'b1,
  parameter bit          HAS_FIFO    = 1'b1,
  parameter int unsigned GLOBAL_MODE = 0,
  parameter bit          HAS_RMT     = 1'b0,
  parameter int unsigned FIFO_DEPTH  = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  pe_req_t           pe_i,
  output pe_rsp_t           pe_o,
  // REGISTERS ring
  output logic [DATA_W-1:0] reg_to_next,
  output logic [DATA_W-1:0] reg_to_prev,
  input  logic [DATA_W-1:0] reg_from_prev,
  input  logic [DATA_W-1:0] reg_from_next,
  output logic [7:0]        reg_ctrl,
  // Bi-FIFO ring
  input  fifo_link_req_t    fifo_dn_i,
  output fifo_link_rsp_t    fifo_dn_o,
  output fifo_link_req_t    fifo_up_o,
  input  fifo_link_rsp_t    fifo_up_i,
  output logic              fifo_stall,
  // global port (master)
  output bus_req_t          glb_o,
  input  bus_rsp_t          glb_i,
  // incoming remote port into the local memory (slave)
  input  bus_req_t          rmt_i,
  output bus_rsp_t          rmt_o
);

  bus_req_t cpu_req, mem_req, regs_req, fifo_req, glb_req;
  bus_rsp_t cpu_rsp, mem_rsp, regs_rsp, fifo_rsp, glb_rsp;

  cbi_mpc755 u_cbi (.clk, .rst_n, .pe_i, .pe_o, .bus_o(cpu_req), .bus_i(cpu_rsp));

  cpu_bus #(.HAS_REGS(HAS_REGS), .HAS_FIFO(HAS_FIFO), .HAS_GLOBAL(GLOBAL_MODE != 0)) u_bus (
    .clk, .rst_n,
    .m_i(cpu_req), .m_o(cpu_rsp),
    .mem_o(mem_req), .mem_i(mem_rsp),
    .regs_o(regs_req), .regs_i(regs_rsp),
    .fifo_o(fifo_req), .fifo_i(fifo_rsp),
    .glb_o(glb_req), .glb_i(glb_rsp));

  // ---- local memory: MBI_SRAM + SRAM, optionally shared with rmt_i ----
  bus_req_t          mbi_req;
  bus_rsp_t          mbi_rsp;
  logic              sram_cs, sram_we;
  logic [BE_W-1:0]   sram_be;
  logic [MEM_AW-1:0] sram_addr;
  logic [DATA_W-1:0] sram_din, sram_dout;

  if (HAS_RMT) begin : g_rmt
    bus_req_t mm_i [2];
    bus_rsp_t mm_o [2];
    bus_req_t ms_o [1];
    bus_rsp_t ms_i [1];
    assign mm_i[0] = mem_req;
    assign mm_i[1] = rmt_i;
    assign mem_rsp = mm_o[0];
    assign rmt_o   = mm_o[1];
    assign mbi_req = ms_o[0];
    assign ms_i[0] = mbi_rsp;
    global_bus #(.NM(2), .NS(1), .ROUTE_ALL(1'b1)) u_mem_arb (
      .clk, .rst_n, .m_i(mm_i), .m_o(mm_o), .s_o(ms_o), .s_i(ms_i));
  end else begin : g_normt
    assign mbi_req = mem_req;
    assign mem_rsp = mbi_rsp;
    assign rmt_o   = BUS_RSP_IDLE;
  end

  mbi_sram #(.MEM_AW(MEM_AW)) u_mbi (
    .clk, .rst_n, .bus_i(mbi_req), .sel(1'b1), .bus_o(mbi_rsp),
    .sram_cs, .sram_we, .sram_be, .sram_addr, .sram_din, .sram_dout);

  sram #(.ADDR_W(MEM_AW), .DATA_W(DATA_W)) u_sram (
    .clk, .sram_cs, .sram_we, .sram_be, .sram_addr, .sram_din, .sram_dout);

  // ---- REGISTERS ----
  if (HAS_REGS) begin : g_regs
    registers u_regs (
      .clk, .rst_n, .bus_i(regs_req), .bus_o(regs_rsp),
      .to_next(reg_to_next), .to_prev(reg_to_prev),
      .from_prev(reg_from_prev), .from_next(reg_from_next),
      .ctrl(reg_ctrl));
  end else begin : g_noregs
    assign regs_rsp    = BUS_RSP_IDLE;
    assign reg_to_next = '0;
    assign reg_to_prev = '0;
    assign reg_ctrl    = '0;
  end

  // ---- Bi-FIFO ----
  if (HAS_FIFO) begin : g_fifo
    bififo #(.DEPTH(FIFO_DEPTH)) u_bififo (
      .clk, .rst_n, .bus_i(fifo_req), .bus_o(fifo_rsp),
      .dn_i(fifo_dn_i), .dn_o(fifo_dn_o),
      .up_o(fifo_up_o), .up_i(fifo_up_i),
      .stall(fifo_stall));
  end else begin : g_nofifo
    assign fifo_rsp   = BUS_RSP_IDLE;
    assign fifo_dn_o  = '{rdata: '0, empty: 1'b1, full: 1'b1};
    assign fifo_up_o  = '0;
    assign fifo_stall = 1'b0;
  end

  // ---- global port ----
  if (GLOBAL_MODE == 1) begin : g_gbi
    gbi_gb3 u_gbi (.clk, .rst_n, .s_i(glb_req), .s_o(glb_rsp), .m_o(glb_o), .m_i(glb_i));
  end else if (GLOBAL_MODE == 2) begin : g_raw
    assign glb_o   = glb_req;
    assign glb_rsp = glb_i;
  end else begin : g_noglb
    assign glb_o   = BUS_REQ_IDLE;
    assign glb_rsp = BUS_RSP_IDLE;
  end

endmodule
