// Testbench for cbi_mpc755: transfers from the processor port appear on the
// bus with the right fields, ta comes one cycle after ack with the read
// data, a retry makes the interface re-issue the transfer.
module tb_cbi_mpc755;
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

  pe_req_t pe_i [1]; pe_rsp_t pe_o [1];
  bus_req_t b; bus_rsp_t br;
  int lat = 2, retry_next = 0, nreq = 0, ntr = 0;
  bus_req_t last;
  cbi_mpc755 dut (.clk, .rst_n, .pe_i(pe_i[0]), .pe_o(pe_o[0]), .bus_o(b), .bus_i(br));
  // responder: ack in the (lat+1)th cycle of req (L = lat+1), data {~addr, addr};
  // ts to ta is then L+1 cycles. It can retry once.
  int cnt = 0;
  always_ff @(posedge clk) begin
    br <= '0;
    if (b.req && !br.ack && !br.retry) begin
      if (cnt == 0) nreq <= nreq + 1;
      if (retry_next != 0 && cnt == 0) begin br.retry <= 1; retry_next <= 0; end
      else if (cnt == lat - 1) begin br.ack <= 1; br.rdata <= {~b.addr, b.addr}; cnt <= 0; last <= b; ntr <= ntr + 1; end
      else cnt <= cnt + 1;
    end
  end
  initial begin
    logic [63:0] q; int c;
    pe_i[0] = '0; rst_n = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    check(!b.req && !pe_o[0].ta, "idle after reset");
    pe(0, 0, 32'h0000_1238, 64'h1122_3344_5566_7788, q, c);
    check(last.we && last.addr == 32'h0000_1238 && last.wdata == 64'h1122_3344_5566_7788 && last.be == 8'hff, "write fields on bus");
    check(c == lat + 2, $sformatf("ts to ta %0d cycles for slave latency %0d", c, lat));
    pe(0, 1, 32'h0000_0400, 0, q, c);
    check(!last.we && q == {~32'h400, 32'h400}, $sformatf("read data %h", q));
    lat = 6;
    pe(0, 1, 32'h0000_0408, 0, q, c);
    check(c == 8, $sformatf("slow slave: %0d cycles", c));
    lat = 2; retry_next = 1; nreq = 0; ntr = 0;
    pe(0, 1, 32'h0000_0410, 0, q, c);
    check(nreq == 2 && ntr == 1 && q == {~32'h410, 32'h410}, $sformatf("retry re-issued: %0d requests", nreq));
    // back-to-back: a new ts in the ta cycle
    @(negedge clk);
    pe_i[0].ts = 1; pe_i[0].rd = 1; pe_i[0].addr = 32'h20;
    @(negedge clk); pe_i[0].ts = 0;
    while (!pe_o[0].ta) @(negedge clk);
    pe_i[0].ts = 1; pe_i[0].addr = 32'h28;
    @(negedge clk); pe_i[0].ts = 0;
    while (!pe_o[0].ta) @(negedge clk);
    check(pe_o[0].rdata[31:0] == 32'h28, "transfer started in the ta cycle completes");
    @(negedge clk);
    check(!pe_o[0].ta && !b.req, "single-cycle ta, bus released");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
