// Testbench for global_bus with three masters, the global memory as slave 0
// and a test responder as slave 1: 3-cycle uncontended read, concurrent
// masters with correct data, routing by address, retry, unmapped address.
module tb_global_bus;
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

  bus_req_t mq [3]; bus_rsp_t mr [3];
  bus_req_t so [2]; bus_rsp_t si [2];
  logic cs, we; logic [7:0] be; logic [9:0] sa; logic [63:0] sd, sq;
  global_bus #(.NM(3), .NS(2)) dut (.clk, .rst_n, .m_i(mq), .m_o(mr), .s_o(so), .s_i(si));
  mbi_sram #(.MEM_AW(10)) u_mbi (.clk, .rst_n, .bus_i(so[0]), .sel(1'b1), .bus_o(si[0]),
    .sram_cs(cs), .sram_we(we), .sram_be(be), .sram_addr(sa), .sram_din(sd), .sram_dout(sq));
  sram #(.ADDR_W(10)) u_mem (.clk, .sram_cs(cs), .sram_we(we), .sram_be(be), .sram_addr(sa), .sram_din(sd), .sram_dout(sq));
  // slave 1: answers after 3 cycles with the address as data; retries the first request
  int s1_cnt = 0, s1_retry = 1, s1_seen = 0;
  always_ff @(posedge clk) begin
    si[1] <= '0;
    if (so[1].req && !si[1].ack && !si[1].retry) begin
      s1_cnt <= s1_cnt + 1;
      if (s1_retry > 0 && s1_cnt == 1) begin si[1].retry <= 1; s1_retry <= 0; s1_cnt <= 0; end
      else if (s1_cnt == 2) begin si[1].ack <= 1; si[1].rdata <= {32'h0, so[1].addr}; s1_cnt <= 0; s1_seen <= s1_seen + 1; end
    end else if (!so[1].req) s1_cnt <= 0;
  end
  int overlap = 0;
  always @(posedge clk) if ((mq[0].req + mq[1].req + mq[2].req) > 1) overlap++;
  initial begin
    logic [63:0] d; int c;
    foreach (mq[i]) mq[i] = '0; rst_n = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    xfer0(1, 32'h4000_0040, 64'hdead, 8'hff, d, c);
    check(c == 3, $sformatf("uncontended write %0d cycles", c));
    xfer1(0, 32'h4000_0040, 0, 8'hff, d, c);
    check(c == 3, $sformatf("uncontended read %0d cycles (3 expected)", c));
    check(d == 64'hdead, "read back through another master");
    fork
      for (int i = 0; i < 20; i++) begin logic [63:0] dd; int cc; xfer0(1, 32'h4000_0000 + 32'(i*8), 64'(1000 + i), 8'hff, dd, cc); end
      for (int i = 0; i < 20; i++) begin logic [63:0] dd; int cc; xfer1(1, 32'h4000_0400 + 32'(i*8), 64'(2000 + i), 8'hff, dd, cc); end
      for (int i = 0; i < 20; i++) begin logic [63:0] dd; int cc; xfer2(1, 32'h4000_0800 + 32'(i*8), 64'(3000 + i), 8'hff, dd, cc); end
    join
    check(overlap > 10, $sformatf("masters contended for %0d cycles", overlap));
    fork
      for (int i = 0; i < 20; i++) begin logic [63:0] dd; int cc; xfer2(0, 32'h4000_0000 + 32'(i*8), 0, 8'hff, dd, cc); check(dd == 64'(1000 + i), "m2 reads m0 data"); end
      for (int i = 0; i < 20; i++) begin logic [63:0] dd; int cc; xfer0(0, 32'h4000_0400 + 32'(i*8), 0, 8'hff, dd, cc); check(dd == 64'(2000 + i), "m0 reads m1 data"); end
      for (int i = 0; i < 20; i++) begin logic [63:0] dd; int cc; xfer1(0, 32'h4000_0800 + 32'(i*8), 0, 8'hff, dd, cc); check(dd == 64'(3000 + i), "m1 reads m2 data"); end
    join
    xfer1(0, 32'h8000_1238, 0, 8'hff, d, c);
    check(d == 64'h8000_1238, $sformatf("slave 1 routed, data %h", d));
    check(s1_retry == 0, "slave 1 retried once");
    check(s1_seen == 1, "slave 1 saw exactly one completed transfer");
    xfer0(0, 32'h0000_0010, 0, 8'hff, d, c);
    check(d == 0 && c <= 3, "unmapped address answered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
