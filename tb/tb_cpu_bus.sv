// Testbench for cpu_bus: each region reaches its slave (test responders
// with distinct latencies and data), absent slaves and unused regions are
// answered by the bus.
module tb_cpu_bus;
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
  bus_req_t so [4]; bus_rsp_t si [4];
  int hits [4] = '{0, 0, 0, 0};
  cpu_bus #(.HAS_REGS(1), .HAS_FIFO(1), .HAS_GLOBAL(1)) dut (.clk, .rst_n, .m_i(m), .m_o(r),
    .mem_o(so[0]), .mem_i(si[0]), .regs_o(so[1]), .regs_i(si[1]), .fifo_o(so[2]), .fifo_i(si[2]), .glb_o(so[3]), .glb_i(si[3]));
  bus_req_t n; bus_rsp_t nr; bus_req_t no [4]; bus_rsp_t ni [4];
  cpu_bus #(.HAS_REGS(0), .HAS_FIFO(0), .HAS_GLOBAL(0)) dut_min (.clk, .rst_n, .m_i(n), .m_o(nr),
    .mem_o(no[0]), .mem_i(ni[0]), .regs_o(no[1]), .regs_i(ni[1]), .fifo_o(no[2]), .fifo_i(ni[2]), .glb_o(no[3]), .glb_i(ni[3]));
  // responder k acks after k+1 cycles with data {k, addr}
  for (genvar k = 0; k < 4; k++) begin : g_resp
    int cnt;
    always_ff @(posedge clk) begin
      si[k] <= '0;
      if (!rst_n) cnt <= 0;
      else if (so[k].req && !si[k].ack) begin
        if (cnt == k) begin si[k].ack <= 1; si[k].rdata <= {32'(k), so[k].addr}; cnt <= 0; hits[k] <= hits[k] + 1; end
        else cnt <= cnt + 1;
      end
    end
  end
  assign ni[0] = '{ack: no[0].req, retry: 1'b0, rdata: 64'h99};
  assign ni[1] = '1; assign ni[2] = '1; assign ni[3] = '1;
  initial begin
    logic [63:0] d; int c;
    logic [31:0] addrs [4] = '{32'h0012_3450, 32'h1000_0008, 32'h2000_0010, 32'h4000_0100};
    m = '0; n = '0; rst_n = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int k = 0; k < 4; k++) begin
      xfer(0, addrs[k], 0, 8'hff, d, c);
      check(d == {32'(k), addrs[k]}, $sformatf("region %0d data %h", k, d));
      check(c == k + 2, $sformatf("region %0d took %0d cycles", k, c));
    end
    xfer(0, 32'h8000_0000, 0, 8'hff, d, c);
    check(d == {32'd3, 32'h8000_0000}, "0x8xxx goes to the global port");
    check(hits[0] == 1 && hits[1] == 1 && hits[2] == 1 && hits[3] == 2, "each slave hit only for its region");
    xfer(1, 32'h3000_0000, 5, 8'hff, d, c);
    check(c == 2 && d == 0, "unused region answered by the bus");
    // bus without REGISTERS, FIFO, global: those regions answered by the bus
    @(negedge clk); n.req = 1; n.addr = 32'h1000_0000;
    @(negedge clk); check(nr.ack && nr.rdata == 0 && !nr.retry, "absent REGISTERS answered with zero");
    @(negedge clk); n.req = 0;
    @(negedge clk); n.req = 1; n.addr = 32'h0000_0040;
    #1 check(nr.ack && nr.rdata == 64'h99, "memory still reachable");
    @(negedge clk); n.req = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
