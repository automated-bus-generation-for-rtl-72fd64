// MBI_SRAM: memory-to-bus interface. It answers bus transfers addressed to
// its SRAM (sel) and maps the byte address onto SRAM words: bus address bits
// [MEM_AW+2:3] drive sram_addr[MEM_AW-1:0], as in the generator's wire
// library entry "w_addr 20 SRAM_A sram_addr 19 0 MBI_SRAM addr 22 3".
//
// Timing (this design's choice): in the first cycle of a transfer the SRAM
// is selected; in the second cycle ack is high and, for a read, rdata carries
// the SRAM output. A new transfer can start in the cycle after ack. The
// interface never answers with retry.
module mbi_sram
  import bussyn_pkg::*;
#(
  parameter int unsigned MEM_AW = 20
) (
  input  logic                clk,
  input  logic                rst_n,
  input  bus_req_t            bus_i,
  input  logic                sel,
  output bus_rsp_t            bus_o,
  output logic                sram_cs,
  output logic                sram_we,
  output logic [BE_W-1:0]     sram_be,
  output logic [MEM_AW-1:0]   sram_addr,
  output logic [DATA_W-1:0]   sram_din,
  input  logic [DATA_W-1:0]   sram_dout
);

  logic pend;   // SRAM was accessed last cycle; ack now

  always_ff @(posedge clk) begin
    if (!rst_n) pend <= 1'b0;
    else        pend <= sram_cs;
  end

  always_comb begin
    sram_cs   = bus_i.req && sel && !pend;
    sram_we   = bus_i.we;
    sram_be   = bus_i.be;
    sram_addr = bus_i.addr[MEM_AW+2:3];
    sram_din  = bus_i.wdata;
    bus_o       = BUS_RSP_IDLE;
    bus_o.ack   = pend;
    bus_o.rdata = pend ? sram_dout : '0;
  end

endmodule
