// Top level: the five bus systems produced by the bus-generation method for
// a four-processor SoC with 32 MB of memory, side by side on one clock and
// reset. They are alternatives, not parts of one chip; each keeps its own
// four processor ports (the processors themselves are outside this RTL):
//   bfba     Bi-FIFO ring, private memories          (bfba_system)
//   gbavi    segmented global bus with bridges       (gbavi_system)
//   gbaviii  local memories plus global memory       (gbaviii_system)
//   hybrid   Bi-FIFO ring plus global memory         (hybrid_system)
//   splitba  two subsystems joined by a bus bridge   (splitba_system)
// Processor port k of a system is the processor of BAN A, B, C, D for
// k = 0..3. Each port takes single-beat transfers (ts) and answers with ta.
module bussyn_top
  import bussyn_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  pe_req_t bfba_pe_i    [4],
  output pe_rsp_t bfba_pe_o    [4],
  input  pe_req_t gbavi_pe_i   [4],
  output pe_rsp_t gbavi_pe_o   [4],
  input  pe_req_t gbaviii_pe_i [4],
  output pe_rsp_t gbaviii_pe_o [4],
  input  pe_req_t hybrid_pe_i  [4],
  output pe_rsp_t hybrid_pe_o  [4],
  input  pe_req_t splitba_pe_i [4],
  output pe_rsp_t splitba_pe_o [4]
);

  bfba_system    u_bfba    (.clk, .rst_n, .pe_i(bfba_pe_i),    .pe_o(bfba_pe_o));
  gbavi_system   u_gbavi   (.clk, .rst_n, .pe_i(gbavi_pe_i),   .pe_o(gbavi_pe_o));
  gbaviii_system u_gbaviii (.clk, .rst_n, .pe_i(gbaviii_pe_i), .pe_o(gbaviii_pe_o));
  hybrid_system  u_hybrid  (.clk, .rst_n, .pe_i(hybrid_pe_i),  .pe_o(hybrid_pe_o));
  splitba_system u_splitba (.clk, .rst_n, .pe_i(splitba_pe_i), .pe_o(splitba_pe_o));

endmodule
