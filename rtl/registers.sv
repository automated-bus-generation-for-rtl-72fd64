// REGISTERS: mailbox and control registers of a BAN. The REGISTERS of the
// BANs are chained in a ring (A -> B -> C -> D -> A): each BAN writes one
// word that its next BAN can read and one word that its previous BAN can
// read, which lets neighbouring processors signal each other (for instance
// "block ready" in a pipelined program). A control word drives the enables
// of the BAN's bus bridges (GBAVI).
//
// Register map (CPU-bus offset = addr[5:3]):
//   0 TO_NEXT   read/write, seen by the next BAN as FROM_PREV
//   1 TO_PREV   read/write, seen by the previous BAN as FROM_NEXT
//   2 FROM_PREV read only
//   3 FROM_NEXT read only
//   4 CTRL      read/write, low 8 bits drive ctrl
//   5..7        read as zero, writes ignored
// Writes honour the byte enables. Every access is acknowledged one cycle
// after req. The bus method only names these registers and draws their ring;
// the map, widths and the control word are this design's choices.
module registers
  import bussyn_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  bus_req_t          bus_i,
  output bus_rsp_t          bus_o,
  output logic [DATA_W-1:0] to_next,
  output logic [DATA_W-1:0] to_prev,
  input  logic [DATA_W-1:0] from_prev,
  input  logic [DATA_W-1:0] from_next,
  output logic [7:0]        ctrl
);

  logic [2:0]        idx;
  logic [DATA_W-1:0] ctrl_w, rd_val, bmask;
  logic              ack_q;
  logic [DATA_W-1:0] rdata_q;

  assign ctrl = ctrl_w[7:0];

  always_comb begin
    idx = bus_i.addr[5:3];
    for (int b = 0; b < BE_W; b++) bmask[b*8 +: 8] = {8{bus_i.be[b]}};
    unique case (idx)
      3'd0:    rd_val = to_next;
      3'd1:    rd_val = to_prev;
      3'd2:    rd_val = from_prev;
      3'd3:    rd_val = from_next;
      3'd4:    rd_val = ctrl_w;
      default: rd_val = '0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      to_next <= '0;
      to_prev <= '0;
      ctrl_w  <= '0;
      ack_q   <= 1'b0;
      rdata_q <= '0;
    end else begin
      ack_q <= bus_i.req && !ack_q;
      if (bus_i.req && !ack_q) begin
        rdata_q <= rd_val;
        if (bus_i.we) begin
          unique case (idx)
            3'd0:    to_next <= (to_next & ~bmask) | (bus_i.wdata & bmask);
            3'd1:    to_prev <= (to_prev & ~bmask) | (bus_i.wdata & bmask);
            3'd4:    ctrl_w  <= (ctrl_w & ~bmask) | (bus_i.wdata & bmask & DATA_W'(8'hff));
            default: ;
          endcase
        end
      end
    end
  end

  always_comb begin
    bus_o       = BUS_RSP_IDLE;
    bus_o.ack   = ack_q;
    bus_o.rdata = ack_q ? rdata_q : '0;
  end

endmodule
