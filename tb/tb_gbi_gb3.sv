// Testbench for gbi_gb3: two GBIs on a global bus with a global memory;
// data passes unchanged, addresses unchanged, contention resolved.
module tb_gbi_gb3;
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
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic xfer0(input bit we, input logic [31:0] a, input logic [63:0] wd,
                        input logic [7:0] be, output logic [63:0] rd, output int cyc);
    @(negedge clk);
    s0.req = 1; s0.we = we; s0.addr = a; s0.wdata = wd; s0.be = be;
    cyc = 1;
    #1;
    while (!r0.ack) begin
      if (r0.retry) begin
        @(posedge clk); #1 s0.req = 0;
        @(negedge clk); s0.req = 1; cyc++;
      end
      @(negedge clk); #1; cyc++;
      if (cyc > 2000) break;
    end
    rd = r0.rdata;
    @(posedge clk); #1 s0.req = 0;
  endtask

  task automatic xfer1(input bit we, input logic [31:0] a, input logic [63:0] wd,
                        input logic [7:0] be, output logic [63:0] rd, output int cyc);
    @(negedge clk);
    s1.req = 1; s1.we = we; s1.addr = a; s1.wdata = wd; s1.be = be;
    cyc = 1;
    #1;
    while (!r1.ack) begin
      if (r1.retry) begin
        @(posedge clk); #1 s1.req = 0;
        @(negedge clk); s1.req = 1; cyc++;
      end
      @(negedge clk); #1; cyc++;
      if (cyc > 2000) break;
    end
    rd = r1.rdata;
    @(posedge clk); #1 s1.req = 0;
  endtask

  bus_req_t s0, s1; bus_rsp_t r0, r1;
  bus_req_t gm [2]; bus_rsp_t gr [2]; bus_req_t s1x;
  gbi_gb3 dut0 (.clk, .rst_n, .s_i(s0), .s_o(r0), .m_o(gm[0]), .m_i(gr[0]));
  gbi_gb3 dut1 (.clk, .rst_n, .s_i(s1), .s_o(r1), .m_o(gm[1]), .m_i(gr[1]));
  ban_g #(.NM(2), .NS(1), .MEM_AW(10)) u_g (.clk, .rst_n, .m_i(gm), .m_o(gr), .s1_o(s1x), .s1_i('0));
  initial begin
    logic [63:0] d; int c;
    s0 = '0; s1 = '0; rst_n = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    xfer0(1, 32'h4000_0018, 64'h0102_0304_0506_0708, 8'hff, d, c);
    check(gm[0].addr == 32'h4000_0018, "address passed unchanged");
    check(c == 5, $sformatf("write through GBI %0d cycles", c));
    xfer1(0, 32'h4000_0018, 0, 8'hff, d, c);
    check(d == 64'h0102_0304_0506_0708 && c == 5, $sformatf("read %h in %0d cycles", d, c));
    fork
      for (int i = 0; i < 10; i++) begin logic [63:0] dd; int cc; xfer0(1, 32'h4000_0100 + 32'(i*8), 64'(i), 8'hff, dd, cc); end
      for (int i = 0; i < 10; i++) begin logic [63:0] dd; int cc; xfer1(1, 32'h4000_0200 + 32'(i*8), 64'(i+50), 8'hff, dd, cc); end
    join
    for (int i = 0; i < 10; i++) begin
      xfer0(0, 32'h4000_0200 + 32'(i*8), 0, 8'hff, d, c); check(d == 64'(i+50), "GBI0 reads GBI1 data");
      xfer1(0, 32'h4000_0100 + 32'(i*8), 0, 8'hff, d, c); check(d == 64'(i), "GBI1 reads GBI0 data");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
