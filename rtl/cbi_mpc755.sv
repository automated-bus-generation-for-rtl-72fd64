// CBI_MPC755: CPU/PE-to-bus interface. It adapts the processor's transfer
// port to the BAN's CPU bus, where the CBI is the bus master.
//
// Processor side: a one-cycle ts with rd/addr/wdata/be starts a single-beat
// transfer; the CBI answers with a one-cycle ta (and rdata for a read). A new
// ts is allowed from the cycle in which ta is high. Bus side: the latched
// transfer is driven with req from the cycle after ts until the bus answers.
// On ack the CBI returns ta one cycle later. On retry it drops req for one
// cycle and issues the same transfer again.
//
// Timing: ts in cycle 0, req from cycle 1; if the slave acks in the L-th
// cycle of req (L = 2 for the local SRAM), ta is high in cycle L+1.
//
// The bus method only names this interface; the processor's own bus
// protocol (bursts, address/data tenures) is not modelled here, and the
// single-beat ts/ta port is this design's stand-in for it.
module cbi_mpc755
  import bussyn_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  pe_req_t  pe_i,
  output pe_rsp_t  pe_o,
  output bus_req_t bus_o,
  input  bus_rsp_t bus_i
);

  typedef enum logic [1:0] {S_IDLE, S_BUS, S_RETRY} state_e;
  state_e   state;
  bus_req_t xfer;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IDLE;
      xfer  <= BUS_REQ_IDLE;
      pe_o  <= '0;
    end else begin
      pe_o.ta <= 1'b0;
      unique case (state)
        S_IDLE: if (pe_i.ts) begin
          xfer.we    <= !pe_i.rd;
          xfer.addr  <= pe_i.addr;
          xfer.wdata <= pe_i.wdata;
          xfer.be    <= pe_i.be;
          state      <= S_BUS;
        end
        S_BUS: if (bus_i.ack) begin
          pe_o.ta    <= 1'b1;
          pe_o.rdata <= bus_i.rdata;
          state      <= S_IDLE;
        end else if (bus_i.retry) begin
          state      <= S_RETRY;
        end
        S_RETRY: state <= S_BUS;
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    bus_o     = xfer;
    bus_o.req = (state == S_BUS);
  end

  // The processor must wait for ta before starting another transfer.
  a_no_ts_while_busy: assert property (@(posedge clk) disable iff (!rst_n)
    pe_i.ts |-> state == S_IDLE);

endmodule
