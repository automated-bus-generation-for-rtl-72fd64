// Bus bridge (BB): a controllable one-way connection from one bus to
// another. Its slave port sits on the first bus, its master port on the
// second. While en is high a transfer arriving at the slave port is
// registered, driven on the second bus (address mapped as
// (addr & ADDR_MASK) | ADDR_SET), and its response is returned on the first
// bus. While en is low the buses are disconnected: the transfer waits at
// the slave port until the bridge is enabled.
//
// A retry from the second bus makes the bridge drop its request for one
// cycle and issue it again. When block is high, a new transfer is answered
// with retry instead of being accepted; SplitBA uses this to resolve two
// subsystems reaching into each other at the same time (see splitba_system).
//
// Timing: request in cycle 0, request on the second bus in cycle 1, ack on
// the first bus one cycle after the second bus acks. Registering both
// directions is this design's choice; it keeps rings of bridges free of
// combinational loops.
module bus_bridge
  import bussyn_pkg::*;
#(
  parameter logic [ADDR_W-1:0] ADDR_MASK = '1,
  parameter logic [ADDR_W-1:0] ADDR_SET  = '0
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     en,
  input  logic     block,
  input  bus_req_t s_i,
  output bus_rsp_t s_o,
  output bus_req_t m_o,
  input  bus_rsp_t m_i,
  output logic     busy
);

  typedef enum logic [2:0] {S_IDLE, S_FWD, S_AGAIN, S_RESP, S_RTY} state_e;
  state_e            state;
  bus_req_t          xfer;
  logic [DATA_W-1:0] rdata_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      xfer    <= BUS_REQ_IDLE;
      rdata_q <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (s_i.req) begin
          if (block) state <= S_RTY;
          else if (en) begin
            xfer      <= s_i;
            xfer.addr <= (s_i.addr & ADDR_MASK) | ADDR_SET;
            state     <= S_FWD;
          end
        end
        S_FWD: if (m_i.ack) begin
          rdata_q <= m_i.rdata;
          state   <= S_RESP;
        end else if (m_i.retry) begin
          state <= S_AGAIN;
        end
        S_AGAIN: state <= S_FWD;
        S_RESP:  state <= S_IDLE;
        S_RTY:   state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    m_o       = xfer;
    m_o.req   = (state == S_FWD);
    s_o       = BUS_RSP_IDLE;
    s_o.ack   = (state == S_RESP);
    s_o.retry = (state == S_RTY);
    s_o.rdata = (state == S_RESP) ? rdata_q : '0;
    busy      = (state != S_IDLE);
  end

endmodule
