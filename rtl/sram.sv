// Single-port synchronous SRAM, one per BAN (SRAM_A..D) and for the global
// memories. 2**ADDR_W words of DATA_W bits; the default 2**20 x 64 bits is
// 8 MB, so four of them make the 32 MB of a four-processor system.
//
// A write (sram_cs & sram_we) updates the bytes selected by sram_be at the
// clock edge. A read (sram_cs & !sram_we) presents the word on sram_dout
// one clock later; sram_dout holds its value until the next read. Contents
// are not initialised. The port names follow the bus generator's wire
// library (sram_addr); the one-cycle read latency is this design's choice.
module sram #(
  parameter int unsigned ADDR_W = 20,
  parameter int unsigned DATA_W = 64
) (
  input  logic                clk,
  input  logic                sram_cs,
  input  logic                sram_we,
  input  logic [DATA_W/8-1:0] sram_be,
  input  logic [ADDR_W-1:0]   sram_addr,
  input  logic [DATA_W-1:0]   sram_din,
  output logic [DATA_W-1:0]   sram_dout
);

  logic [DATA_W-1:0] mem [2**ADDR_W];

  always_ff @(posedge clk) begin
    if (sram_cs) begin
      if (sram_we) begin
        for (int b = 0; b < DATA_W / 8; b++)
          if (sram_be[b]) mem[sram_addr][b*8 +: 8] <= sram_din[b*8 +: 8];
      end else begin
        sram_dout <= mem[sram_addr];
      end
    end
  end

endmodule
