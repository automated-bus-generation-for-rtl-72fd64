// Testbench for bififo: two Bi-FIFOs joined in a ring of two BANs. Words
// sent to the next BAN arrive in order at its "from previous" port and
// back; a write into a full queue and a read from an empty one stall until
// the other side acts; status counts.
module tb_bififo;
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

  task automatic xferA(input bit we, input logic [31:0] a, input logic [63:0] wd,
                        input logic [7:0] be, output logic [63:0] rd, output int cyc);
    @(negedge clk);
    ma.req = 1; ma.we = we; ma.addr = a; ma.wdata = wd; ma.be = be;
    cyc = 1;
    #1;
    while (!ra.ack) begin
      if (ra.retry) begin
        @(posedge clk); #1 ma.req = 0;
        @(negedge clk); ma.req = 1; cyc++;
      end
      @(negedge clk); #1; cyc++;
      if (cyc > 2000) break;
    end
    rd = ra.rdata;
    @(posedge clk); #1 ma.req = 0;
  endtask

  task automatic xferB(input bit we, input logic [31:0] a, input logic [63:0] wd,
                        input logic [7:0] be, output logic [63:0] rd, output int cyc);
    @(negedge clk);
    mb.req = 1; mb.we = we; mb.addr = a; mb.wdata = wd; mb.be = be;
    cyc = 1;
    #1;
    while (!rb.ack) begin
      if (rb.retry) begin
        @(posedge clk); #1 mb.req = 0;
        @(negedge clk); mb.req = 1; cyc++;
      end
      @(negedge clk); #1; cyc++;
      if (cyc > 2000) break;
    end
    rd = rb.rdata;
    @(posedge clk); #1 mb.req = 0;
  endtask

  bus_req_t ma, mb; bus_rsp_t ra, rb;
  fifo_link_req_t a_up, b_up; fifo_link_rsp_t a_dn, b_dn;
  logic sa, sb;
  int stalls = 0;
  bififo #(.DEPTH(16)) dut_a (.clk, .rst_n, .bus_i(ma), .bus_o(ra), .dn_i(b_up), .dn_o(a_dn), .up_o(a_up), .up_i(b_dn), .stall(sa));
  bififo #(.DEPTH(16)) dut_b (.clk, .rst_n, .bus_i(mb), .bus_o(rb), .dn_i(a_up), .dn_o(b_dn), .up_o(b_up), .up_i(a_dn), .stall(sb));
  always @(posedge clk) if (sa || sb) stalls++;
  logic [63:0] sent [$];
  initial begin
    logic [63:0] d; int c;
    ma = '0; mb = '0; rst_n = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    // A -> B: 16 words fill the queue
    for (int i = 0; i < 16; i++) begin
      logic [63:0] v = {$urandom, $urandom};
      xferA(1, 32'h2000_0000, v, 8'hff, d, c);
      check(c == 2, $sformatf("push cycles %0d", c));
      sent.push_back(v);
    end
    xferA(0, 32'h2000_0010, 0, 8'hff, d, c);
    check(d[4:0] == 5'd16 && d[12:8] == 0, $sformatf("A status %h", d));
    xferB(0, 32'h2000_0010, 0, 8'hff, d, c);
    check(d[16] == 0 && d[17] == 0, $sformatf("B sees A->B not empty %h", d));
    // 17th write stalls until B reads
    fork
      begin
        logic [63:0] v = 64'h1717_1717_1717_1717;
        xferA(1, 32'h2000_0000, v, 8'hff, d, c);
        check(c >= 10, $sformatf("write into full queue stalled %0d cycles", c));
        sent.push_back(v);
      end
      begin
        logic [63:0] d2; int c2;
        repeat (10) @(negedge clk);
        xferB(0, 32'h2000_0008, 0, 8'hff, d2, c2);
        check(d2 == sent[0], "first word at B");
        void'(sent.pop_front());
      end
    join
    for (int i = 0; i < 16; i++) begin
      xferB(0, 32'h2000_0008, 0, 8'hff, d, c);
      check(d == sent[0], $sformatf("word %0d at B: %h exp %h", i, d, sent[0]));
      void'(sent.pop_front());
    end
    // B reads from empty: stalls until A sends
    fork
      begin
        xferB(0, 32'h2000_0008, 0, 8'hff, d, c);
        check(d == 64'hcafe && c >= 8, $sformatf("read from empty stalled %0d cycles, data %h", c, d));
      end
      begin
        logic [63:0] d2; int c2;
        repeat (8) @(negedge clk);
        xferA(1, 32'h2000_0000, 64'hcafe, 8'hff, d2, c2);
      end
    join
    // B -> A (to previous) arrives at A's "from next"
    for (int i = 0; i < 5; i++) xferB(1, 32'h2000_0008, 64'(100 + i), 8'hff, d, c);
    xferA(0, 32'h2000_0010, 0, 8'hff, d, c);
    check(d[12:8] == 5'd5, $sformatf("A upq count %h", d));
    for (int i = 0; i < 5; i++) begin
      xferA(0, 32'h2000_0000, 0, 8'hff, d, c);
      check(d == 64'(100 + i), $sformatf("B->A word %0d = %0d", i, d));
    end
    // ring of two: A -> previous is B, B -> next is A
    xferA(1, 32'h2000_0008, 64'h77, 8'hff, d, c);
    xferB(0, 32'h2000_0000, 0, 8'hff, d, c);
    check(d == 64'h77, "A to previous arrives at B from next");
    check(stalls > 10, $sformatf("stall cycles seen %0d", stalls));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
