// Testbench for registers: mailbox words to the neighbours, read-only
// incoming words, control byte, byte enables, one-cycle acknowledge.
module tb_registers;
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

  task automatic xfer(input bit we, input logic [31:0] a, input logic [63:0] wd,
                        input logic [7:0] be, output logic [63:0] rd, output int cyc);
    @(negedge clk);
    m.req = 1; m.we = we; m.addr = a; m.wdata = wd; m.be = be;
    cyc = 1;
    #1;
    while (!r.ack) begin
      if (r.retry) begin
        @(posedge clk); #1 m.req = 0;
        @(negedge clk); m.req = 1; cyc++;
      end
      @(negedge clk); #1; cyc++;
      if (cyc > 2000) break;
    end
    rd = r.rdata;
    @(posedge clk); #1 m.req = 0;
  endtask

  bus_req_t m; bus_rsp_t r;
  logic [63:0] to_next, to_prev, from_prev, from_next; logic [7:0] ctrl;
  registers dut (.clk, .rst_n, .bus_i(m), .bus_o(r), .to_next, .to_prev, .from_prev, .from_next, .ctrl);
  initial begin
    logic [63:0] d; int c;
    m = '0; rst_n = 0; from_prev = 64'hAAAA_0000_1111_2222; from_next = 64'h5555_6666_7777_8888;
    repeat (2) @(negedge clk); rst_n = 1;
    check(to_next == 0 && to_prev == 0 && ctrl == 0, "reset values");
    xfer(1, 32'h1000_0000, 64'h0123_4567_89ab_cdef, 8'hff, d, c);
    check(c == 2, $sformatf("write cycles %0d", c));
    check(to_next == 64'h0123_4567_89ab_cdef, "TO_NEXT output");
    xfer(1, 32'h1000_0008, 64'hfeed_beef_0000_0001, 8'hff, d, c);
    check(to_prev == 64'hfeed_beef_0000_0001, "TO_PREV output");
    xfer(1, 32'h1000_0008, 64'h0000_0000_0000_ff00, 8'h02, d, c);
    check(to_prev == 64'hfeed_beef_0000_ff01, "byte-enable write");
    xfer(0, 32'h1000_0000, 0, 8'hff, d, c);
    check(d == 64'h0123_4567_89ab_cdef && c == 2, "read TO_NEXT");
    xfer(0, 32'h1000_0010, 0, 8'hff, d, c);
    check(d == from_prev, "read FROM_PREV");
    xfer(0, 32'h1000_0018, 0, 8'hff, d, c);
    check(d == from_next, "read FROM_NEXT");
    xfer(1, 32'h1000_0010, 64'h0, 8'hff, d, c);
    xfer(0, 32'h1000_0010, 0, 8'hff, d, c);
    check(d == from_prev, "FROM_PREV is read-only");
    xfer(1, 32'h1000_0020, 64'hffff_ffff_ffff_ff5a, 8'hff, d, c);
    check(ctrl == 8'h5a, "CTRL drives ctrl");
    xfer(0, 32'h1000_0020, 0, 8'hff, d, c);
    check(d == 64'h5a, "CTRL reads back low byte only");
    xfer(0, 32'h1000_0028, 0, 8'hff, d, c);
    check(d == 0, "unused register reads zero");
    from_prev = 64'h1; #1;
    xfer(0, 32'h1000_0010, 0, 8'hff, d, c);
    check(d == 64'h1, "FROM_PREV follows input");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
