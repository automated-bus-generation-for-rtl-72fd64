// Testbench for ban_g (global arbiter, global bus, MBI, global SRAM) with
// four masters: 3-cycle read, shared data, concurrent access.
module tb_ban_g;
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

  task automatic xfer0(input bit we, input logic [31:0] a, input logic [63:0] wd,
                        input logic [7:0] be, output logic [63:0] rd, output int cyc);
    @(negedge clk);
    mq[0].req = 1; mq[0].we = we; mq[0].addr = a; mq[0].wdata = wd; mq[0].be = be;
    cyc = 1;
    #1;
    while (!mr[0].ack) begin
      if (mr[0].retry) begin
        @(posedge clk); #1 mq[0].req = 0;
        @(negedge clk); mq[0].req = 1; cyc++;
      end
      @(negedge clk); #1; cyc++;
      if (cyc > 2000) break;
    end
    rd = mr[0].rdata;
    @(posedge clk); #1 mq[0].req = 0;
  endtask

  task automatic xfer1(input bit we, input logic [31:0] a, input logic [63:0] wd,
                        input logic [7:0] be, output logic [63:0] rd, output int cyc);
    @(negedge clk);
    mq[1].req = 1; mq[1].we = we; mq[1].addr = a; mq[1].wdata = wd; mq[1].be = be;
    cyc = 1;
    #1;
    while (!mr[1].ack) begin
      if (mr[1].retry) begin
        @(posedge clk); #1 mq[1].req = 0;
        @(negedge clk); mq[1].req = 1; cyc++;
      end
      @(negedge clk); #1; cyc++;
      if (cyc > 2000) break;
    end
    rd = mr[1].rdata;
    @(posedge clk); #1 mq[1].req = 0;
  endtask

  task automatic xfer2(input bit we, input logic [31:0] a, input logic [63:0] wd,
                        input logic [7:0] be, output logic [63:0] rd, output int cyc);
    @(negedge clk);
    mq[2].req = 1; mq[2].we = we; mq[2].addr = a; mq[2].wdata = wd; mq[2].be = be;
    cyc = 1;
    #1;
    while (!mr[2].ack) begin
      if (mr[2].retry) begin
        @(posedge clk); #1 mq[2].req = 0;
        @(negedge clk); mq[2].req = 1; cyc++;
      end
      @(negedge clk); #1; cyc++;
      if (cyc > 2000) break;
    end
    rd = mr[2].rdata;
    @(posedge clk); #1 mq[2].req = 0;
  endtask

  task automatic xfer3(input bit we, input logic [31:0] a, input logic [63:0] wd,
                        input logic [7:0] be, output logic [63:0] rd, output int cyc);
    @(negedge clk);
    mq[3].req = 1; mq[3].we = we; mq[3].addr = a; mq[3].wdata = wd; mq[3].be = be;
    cyc = 1;
    #1;
    while (!mr[3].ack) begin
      if (mr[3].retry) begin
        @(posedge clk); #1 mq[3].req = 0;
        @(negedge clk); mq[3].req = 1; cyc++;
      end
      @(negedge clk); #1; cyc++;
      if (cyc > 2000) break;
    end
    rd = mr[3].rdata;
    @(posedge clk); #1 mq[3].req = 0;
  endtask

  bus_req_t mq [4]; bus_rsp_t mr [4];
  bus_req_t s1; 
  ban_g #(.NM(4), .NS(1), .MEM_AW(12)) dut (.clk, .rst_n, .m_i(mq), .m_o(mr), .s1_o(s1), .s1_i('0));
  initial begin
    logic [63:0] d; int c;
    foreach (mq[i]) mq[i] = '0; rst_n = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    xfer3(1, 32'h4000_7ff8, 64'h1111_2222_3333_4444, 8'hff, d, c);
    xfer0(0, 32'h4000_7ff8, 0, 8'hff, d, c);
    check(c == 3 && d == 64'h1111_2222_3333_4444, $sformatf("read %h in %0d cycles", d, c));
    fork
      for (int i = 0; i < 16; i++) begin logic [63:0] dd; int cc; xfer0(1, 32'h4000_0000 + 32'(i*32),      64'(i),       8'hff, dd, cc); end
      for (int i = 0; i < 16; i++) begin logic [63:0] dd; int cc; xfer1(1, 32'h4000_0000 + 32'(i*32 + 8),  64'(i + 100), 8'hff, dd, cc); end
      for (int i = 0; i < 16; i++) begin logic [63:0] dd; int cc; xfer2(1, 32'h4000_0000 + 32'(i*32 + 16), 64'(i + 200), 8'hff, dd, cc); end
      for (int i = 0; i < 16; i++) begin logic [63:0] dd; int cc; xfer3(1, 32'h4000_0000 + 32'(i*32 + 24), 64'(i + 300), 8'hff, dd, cc); check(cc >= 3, "write takes at least 3 cycles"); end
    join
    for (int i = 0; i < 64; i++) begin
      xfer1(0, 32'h4000_0000 + 32'(i*8), 0, 8'hff, d, c);
      check(d == 64'((i % 4) * 100 + i / 4), $sformatf("word %0d = %0d", i, d));
    end
    check(s1 == '0, "no second slave");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
