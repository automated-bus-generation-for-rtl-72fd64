// Testbench for bus_bridge: forwarding with address mapping and a 4-cycle
// round trip to a 2-cycle memory, waiting while disabled, retry while
// blocked, re-issue after a retry from the far bus.
module tb_bus_bridge;
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
    s.req = 1; s.we = we; s.addr = a; s.wdata = wd; s.be = be;
    cyc = 1;
    #1;
    while (!sr.ack) begin
      if (sr.retry) begin
        @(posedge clk); #1 s.req = 0;
        @(negedge clk); s.req = 1; cyc++;
      end
      @(negedge clk); #1; cyc++;
      if (cyc > 2000) break;
    end
    rd = sr.rdata;
    @(posedge clk); #1 s.req = 0;
  endtask

  bus_req_t s, m; bus_rsp_t sr, mr, mr_mem;
  logic en, block, busy;
  logic cs, we; logic [7:0] be; logic [9:0] sa; logic [63:0] sd, sq;
  bus_bridge #(.ADDR_MASK(32'h0fff_ffff), .ADDR_SET(32'h4000_0000)) dut (
    .clk, .rst_n, .en, .block, .s_i(s), .s_o(sr), .m_o(m), .m_i(mr), .busy);
  mbi_sram #(.MEM_AW(10)) u_mbi (.clk, .rst_n, .bus_i(m), .sel(m.addr[31:28] == 4'h4), .bus_o(mr_mem),
    .sram_cs(cs), .sram_we(we), .sram_be(be), .sram_addr(sa), .sram_din(sd), .sram_dout(sq));
  sram #(.ADDR_W(10)) u_mem (.clk, .sram_cs(cs), .sram_we(we), .sram_be(be), .sram_addr(sa), .sram_din(sd), .sram_dout(sq));
  // far bus: retries the next request when far_retry is set
  logic far_retry, far_retry_q; int far_retries = 0, s_retries = 0;
  always_ff @(posedge clk) begin
    far_retry_q <= 0;
    if (far_retry && m.req && !far_retry_q) begin far_retry_q <= 1; far_retry <= 0; far_retries <= far_retries + 1; end
  end
  always_comb begin
    mr = mr_mem;
    if (far_retry_q) begin mr = '0; mr.retry = 1; end
  end
  logic [31:0] seen_addr;
  always @(posedge clk) begin
    if (m.req) seen_addr <= m.addr;
    if (sr.retry) s_retries++;
  end
  initial begin
    logic [63:0] d; int c;
    s = '0; en = 1; block = 0; far_retry = 0; rst_n = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    xfer(1, 32'h8000_0100, 64'habcd, 8'hff, d, c);
    check(c == 4, $sformatf("write round trip %0d cycles", c));
    check(seen_addr == 32'h4000_0100, $sformatf("address mapped to %h", seen_addr));
    xfer(0, 32'h8000_0100, 0, 8'hff, d, c);
    check(c == 4 && d == 64'habcd, $sformatf("read %h in %0d cycles", d, c));
    // disabled: waits until enabled
    en = 0;
    fork
      begin xfer(0, 32'h8000_0100, 0, 8'hff, d, c); end
      begin
        repeat (10) @(negedge clk);
        check(!m.req && !sr.ack, "nothing forwarded while disabled");
        en = 1;
      end
    join
    check(c >= 12 && d == 64'habcd, $sformatf("disabled bridge held transfer %0d cycles", c));
    // blocked: answered with retry until unblocked
    block = 1;
    fork
      begin xfer(1, 32'h8000_0108, 64'h55, 8'hff, d, c); end
      begin repeat (6) @(negedge clk); block = 0; end
    join
    check(s_retries >= 2, $sformatf("retries while blocked %0d", s_retries));
    xfer(0, 32'h8000_0108, 0, 8'hff, d, c);
    check(d == 64'h55, "blocked write done after unblock");
    // far bus retries: bridge re-issues by itself
    far_retry = 1;
    s_retries = 0;
    xfer(0, 32'h8000_0100, 0, 8'hff, d, c);
    check(far_retries == 1 && s_retries == 0 && d == 64'habcd, "far retry handled inside the bridge");
    check(c > 4, "far retry costs cycles");
    check(!busy, "idle after transfers");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
