// Testbench for ban with every option on, closed on itself as a ring of
// one BAN and with a global memory node: local SRAM, REGISTERS, Bi-FIFO,
// global memory through the GBI, incoming remote transfers, latencies.
module tb_ban;
  import bussyn_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n;
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one single-beat transfer on processor port k; cyc = cycles from ts to ta
  task automatic pe(input int k, input bit rd, input logic [31:0] a, input logic [63:0] wd,
                   output logic [63:0] q, output int cyc);
    @(negedge clk);
    pe_i[k].ts = 1; pe_i[k].rd = rd; pe_i[k].addr = a; pe_i[k].wdata = wd; pe_i[k].be = 8'hff;
    @(negedge clk);
    pe_i[k].ts = 0;
    cyc = 1;
    while (!pe_o[k].ta && cyc < 5000) begin @(negedge clk); cyc++; end
    q = pe_o[k].rdata;
  endtask

  task automatic xfer(input bit we, input logic [31:0] a, input logic [63:0] wd,
                        input logic [7:0] be, output logic [63:0] rd, output int cyc);
    @(negedge clk);
    rm.req = 1; rm.we = we; rm.addr = a; rm.wdata = wd; rm.be = be;
    cyc = 1;
    #1;
    while (!rr.ack) begin
      if (rr.retry) begin
        @(posedge clk); #1 rm.req = 0;
        @(negedge clk); rm.req = 1; cyc++;
      end
      @(negedge clk); #1; cyc++;
      if (cyc > 2000) break;
    end
    rd = rr.rdata;
    @(posedge clk); #1 rm.req = 0;
  endtask

  pe_req_t pe_i [1]; pe_rsp_t pe_o [1];
  logic [63:0] to_next, to_prev; logic [7:0] ctrl;
  fifo_link_req_t up; fifo_link_rsp_t dn; logic stall;
  bus_req_t g [1]; bus_rsp_t gr [1]; bus_req_t s1;
  bus_req_t rm; bus_rsp_t rr;
  ban #(.MEM_AW(12), .HAS_REGS(1), .HAS_FIFO(1), .GLOBAL_MODE(1), .HAS_RMT(1), .FIFO_DEPTH(4)) dut (
    .clk, .rst_n, .pe_i(pe_i[0]), .pe_o(pe_o[0]),
    .reg_to_next(to_next), .reg_to_prev(to_prev), .reg_from_prev(to_next), .reg_from_next(to_prev), .reg_ctrl(ctrl),
    .fifo_dn_i(up), .fifo_dn_o(dn), .fifo_up_o(up), .fifo_up_i(dn), .fifo_stall(stall),
    .glb_o(g[0]), .glb_i(gr[0]), .rmt_i(rm), .rmt_o(rr));
  ban_g #(.NM(1), .NS(1), .MEM_AW(10)) u_g (.clk, .rst_n, .m_i(g), .m_o(gr), .s1_o(s1), .s1_i('0));
  // a plain BAN (BFBA-like, no remote port) for the unshared latency
  pe_req_t pe2_i [1]; pe_rsp_t pe2_o [1];
  logic [63:0] t2n, t2p; logic [7:0] c2; fifo_link_req_t up2; fifo_link_rsp_t dn2; logic st2; bus_req_t g2; bus_rsp_t r2;
  ban #(.MEM_AW(12), .HAS_REGS(1), .HAS_FIFO(1), .GLOBAL_MODE(0), .HAS_RMT(0), .FIFO_DEPTH(4)) dut2 (
    .clk, .rst_n, .pe_i(pe2_i[0]), .pe_o(pe2_o[0]),
    .reg_to_next(t2n), .reg_to_prev(t2p), .reg_from_prev(t2n), .reg_from_next(t2p), .reg_ctrl(c2),
    .fifo_dn_i(up2), .fifo_dn_o(dn2), .fifo_up_o(up2), .fifo_up_i(dn2), .fifo_stall(st2),
    .glb_o(g2), .glb_i('0), .rmt_i('0), .rmt_o(r2));
  initial begin
    logic [63:0] q; int c;
    pe_i[0] = '0; pe2_i[0] = '0; rm = '0; rst_n = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    pe(0, 0, 32'h0000_0100, 64'h1111, q, c);
    check(c == 4, $sformatf("local write with remote port %0d cycles", c));
    pe(0, 1, 32'h0000_0100, 0, q, c);
    check(q == 64'h1111 && c == 4, $sformatf("local read %h %0d cycles", q, c));
    pe2_i[0].ts = 1; pe2_i[0].rd = 0; pe2_i[0].addr = 32'h40; pe2_i[0].wdata = 64'h77; pe2_i[0].be = 8'hff;
    @(negedge clk); pe2_i[0].ts = 0; pe2_i[0].rd = 1;
    while (!pe2_o[0].ta) @(negedge clk);
    pe2_i[0].ts = 1; c = 0;
    @(negedge clk); pe2_i[0].ts = 0; c = 1;
    while (!pe2_o[0].ta) begin @(negedge clk); c++; end
    check(c == 3 && pe2_o[0].rdata == 64'h77, $sformatf("plain BAN local read %0d cycles", c));
    // REGISTERS in a ring of one: TO_NEXT comes back as FROM_PREV
    pe(0, 0, 32'h1000_0000, 64'hbeef, q, c);
    check(c == 3, $sformatf("register write %0d cycles", c));
    pe(0, 1, 32'h1000_0010, 0, q, c);
    check(q == 64'hbeef, "FROM_PREV = own TO_NEXT");
    pe(0, 0, 32'h1000_0020, 64'h3, q, c);
    check(ctrl == 8'h3, "control byte");
    // Bi-FIFO: send to next (= self), receive from previous (= self)
    for (int i = 0; i < 4; i++) pe(0, 0, 32'h2000_0000, 64'(10 + i), q, c);
    pe(0, 1, 32'h2000_0010, 0, q, c);
    check(q[3:0] == 4'd4, $sformatf("fifo count %h", q));
    for (int i = 0; i < 4; i++) begin
      pe(0, 1, 32'h2000_0008, 0, q, c);
      check(q == 64'(10 + i), $sformatf("fifo word %0d = %0d", i, q));
    end
    // global memory through GBI: 3 bus cycles + GBI stages
    pe(0, 0, 32'h4000_0200, 64'h6789, q, c);
    pe(0, 1, 32'h4000_0200, 0, q, c);
    check(q == 64'h6789 && c == 6, $sformatf("global read %h in %0d cycles", q, c));
    // remote port into the local memory, concurrent with the processor
    fork
      for (int i = 0; i < 8; i++) begin logic [63:0] d; int cc; xfer(1, 32'h0000_0800 + 32'(i*8), 64'(500 + i), 8'hff, d, cc); end
      for (int i = 0; i < 8; i++) begin logic [63:0] d; int cc; pe(0, 0, 32'h0000_0a00 + 32'(i*8), 64'(600 + i), d, cc); end
    join
    for (int i = 0; i < 8; i++) begin
      pe(0, 1, 32'h0000_0800 + 32'(i*8), 0, q, c);
      check(q == 64'(500 + i), "remote write seen by processor");
      begin logic [63:0] d; int cc; xfer(0, 32'h0000_0a00 + 32'(i*8), 0, 8'hff, d, cc); check(d == 64'(600 + i), "processor write seen remotely"); end
    end
    pe(0, 1, 32'h3000_0000, 0, q, c);
    check(q == 0 && c == 3, "unmapped address answered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
