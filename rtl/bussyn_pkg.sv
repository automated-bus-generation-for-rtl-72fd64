// Types and constants shared by every module of the generated bus systems.
//
// All buses (CPU bus inside a BAN, global bus, bridge links) use one
// request/response pair: the master raises req with we/addr/wdata/be and keeps
// them stable until the slave answers with a one-cycle ack (read data valid in
// the same cycle) or a one-cycle retry, which ends the tenure without doing
// the transfer. Data is 64 bits wide with byte enables, the byte address 32.
//
// The address map (a choice of this design, not fixed by the bus method):
//   0x0xxx_xxxx  local SRAM of the BAN (word address = addr[AW+2:3])
//   0x1xxx_xxxx  REGISTERS
//   0x2xxx_xxxx  Bi-FIFO
//   0x4xxx_xxxx .. 0x7xxx_xxxx  global window (global memory or next BAN)
//   0x8xxx_xxxx and above       other bus subsystem (SplitBA bridge)
package bussyn_pkg;

  localparam int unsigned ADDR_W = 32;
  localparam int unsigned DATA_W = 64;
  localparam int unsigned BE_W   = DATA_W / 8;

  typedef struct packed {
    logic              req;
    logic              we;
    logic [ADDR_W-1:0] addr;
    logic [DATA_W-1:0] wdata;
    logic [BE_W-1:0]   be;
  } bus_req_t;

  typedef struct packed {
    logic              ack;
    logic              retry;
    logic [DATA_W-1:0] rdata;
  } bus_rsp_t;

  // Processor side of a CBI: single-beat transfer start / transfer acknowledge.
  typedef struct packed {
    logic              ts;     // one-cycle transfer start
    logic              rd;     // 1 = read, 0 = write
    logic [ADDR_W-1:0] addr;
    logic [DATA_W-1:0] wdata;
    logic [BE_W-1:0]   be;
  } pe_req_t;

  typedef struct packed {
    logic              ta;     // one-cycle transfer acknowledge
    logic [DATA_W-1:0] rdata;
  } pe_rsp_t;

  // Link between the Bi-FIFOs of two adjacent BANs. The requesting side is
  // the up side of BAN k+1, the answering side the dn side of BAN k, which
  // holds both queues of the pair.
  typedef struct packed {
    logic              push;   // push wdata into the queue towards BAN k
    logic [DATA_W-1:0] wdata;
    logic              pop;    // pop the queue coming from BAN k
  } fifo_link_req_t;

  typedef struct packed {
    logic [DATA_W-1:0] rdata;  // head of the queue coming from BAN k
    logic              empty;  // that queue is empty
    logic              full;   // the queue towards BAN k is full
  } fifo_link_rsp_t;

  typedef enum logic [2:0] {
    RGN_LOCAL,
    RGN_REGS,
    RGN_FIFO,
    RGN_GLOBAL,
    RGN_REMOTE,
    RGN_NONE
  } region_e;

  localparam bus_req_t BUS_REQ_IDLE = '0;
  localparam bus_rsp_t BUS_RSP_IDLE = '0;

  function automatic region_e decode(input logic [ADDR_W-1:0] a);
    unique casez (a[31:28])
      4'b0000: return RGN_LOCAL;
      4'b0001: return RGN_REGS;
      4'b0010: return RGN_FIFO;
      4'b01??: return RGN_GLOBAL;
      4'b1???: return RGN_REMOTE;
      default: return RGN_NONE;
    endcase
  endfunction

endpackage
