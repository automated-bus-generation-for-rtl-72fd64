// Bi-FIFO: bidirectional FIFO between a BAN and the next BAN in the ring.
// This module holds the pair of queues between its own BAN k and BAN k+1:
// dnq carries words from BAN k to BAN k+1, upq words from BAN k+1 to BAN k.
// BAN k+1 reaches the pair over the link on its up side (up_o/up_i), which
// connects to the dn side (dn_i/dn_o) of this module; the two sides stand
// for the fifo_dq_up / fifo_dq_dn ports of the bus generator, with the
// shared data wire split into one wire per direction.
//
// CPU-bus map (offset = addr[4:3]):
//   0  write: send a word to the next BAN      read: receive from the next BAN
//   1  write: send a word to the previous BAN  read: receive from the previous BAN
//   2  read: status {14'b0, prev_full, prev_empty, 3'b0, upq count,
//                    3'b0, dnq count} in the low 32 bits (counts 5 bits each
//                    at bits 12:8 and 4:0, prev flags at bits 17:16)
//   3  reads zero
// A write into a full queue or a read from an empty one stalls: the bus
// waits (stall = 1) until the other BAN has made room or sent a word. A
// transfer that can go ahead completes with ack one cycle after it is done.
// The queue depth is a generator option; blocking full/empty behaviour and
// the map are this design's choices.
module bififo
  import bussyn_pkg::*;
#(
  parameter int unsigned DEPTH = 16
) (
  input  logic           clk,
  input  logic           rst_n,
  input  bus_req_t       bus_i,
  output bus_rsp_t       bus_o,
  input  fifo_link_req_t dn_i,    // from BAN k+1's up side
  output fifo_link_rsp_t dn_o,
  output fifo_link_req_t up_o,    // to BAN k-1's dn side
  input  fifo_link_rsp_t up_i,
  output logic           stall
);

  localparam int unsigned CW = $clog2(DEPTH) + 1;

  logic [DATA_W-1:0] dnq_dout, upq_dout;
  logic              dnq_full, dnq_empty, upq_full, upq_empty;
  logic [CW-1:0]     dnq_count, upq_count;
  logic              dnq_push, upq_pop;
  logic              go;
  logic [DATA_W-1:0] rd_val;
  logic              ack_q;
  logic [DATA_W-1:0] rdata_q;
  logic [1:0]        idx;

  sync_fifo #(.DEPTH(DEPTH), .WIDTH(DATA_W)) u_dnq (
    .clk, .rst_n,
    .push(dnq_push), .din(bus_i.wdata),
    .pop(dn_i.pop), .dout(dnq_dout),
    .full(dnq_full), .empty(dnq_empty), .count(dnq_count));

  sync_fifo #(.DEPTH(DEPTH), .WIDTH(DATA_W)) u_upq (
    .clk, .rst_n,
    .push(dn_i.push), .din(dn_i.wdata),
    .pop(upq_pop), .dout(upq_dout),
    .full(upq_full), .empty(upq_empty), .count(upq_count));

  always_comb begin
    dn_o.rdata = dnq_dout;
    dn_o.empty = dnq_empty;
    dn_o.full  = upq_full;
  end

  always_comb begin
    idx    = bus_i.addr[4:3];
    rd_val = '0;
    unique case (idx)
      2'd0: begin
        go     = bus_i.we ? !dnq_full : !upq_empty;
        rd_val = upq_dout;
      end
      2'd1: begin
        go     = bus_i.we ? !up_i.full : !up_i.empty;
        rd_val = up_i.rdata;
      end
      2'd2: begin
        go     = 1'b1;
        rd_val[CW-1:0]   = dnq_count;
        rd_val[8 +: CW]  = upq_count;
        rd_val[16]       = up_i.empty;
        rd_val[17]       = up_i.full;
      end
      default: go = 1'b1;
    endcase
    go = go && bus_i.req && !ack_q;

    dnq_push   = go && idx == 2'd0 &&  bus_i.we;
    upq_pop    = go && idx == 2'd0 && !bus_i.we;
    up_o.push  = go && idx == 2'd1 &&  bus_i.we;
    up_o.pop   = go && idx == 2'd1 && !bus_i.we;
    up_o.wdata = bus_i.wdata;
    stall      = bus_i.req && !ack_q && !go;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ack_q   <= 1'b0;
      rdata_q <= '0;
    end else begin
      ack_q <= go;
      if (go) rdata_q <= bus_i.we ? '0 : rd_val;
    end
  end

  always_comb begin
    bus_o       = BUS_RSP_IDLE;
    bus_o.ack   = ack_q;
    bus_o.rdata = rdata_q;
  end

endmodule
