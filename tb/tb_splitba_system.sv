// Testbench for splitba_system: each subsystem's memory at 0x4000_0000,
// the other one through the bus bridge at 0x8000_0000, latencies, and both
// subsystems reaching into each other at once (resolved by retry).
module tb_splitba_system;
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
    repeat (200000) @(posedge clk);
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

  pe_req_t pe_i [4]; pe_rsp_t pe_o [4];
  splitba_system dut (.clk, .rst_n, .pe_i, .pe_o);

  int retries = 0, both_busy = 0;
  always @(posedge clk) begin
    if (dut.br_s_rsp[0].retry || dut.br_s_rsp[1].retry) retries++;
    if (dut.br_s_req[0].req && dut.br_s_req[1].req) both_busy++;
  end
  initial begin
    logic [63:0] q; int c;
    foreach (pe_i[k]) pe_i[k] = '0; rst_n = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    pe(0, 0, 32'h4000_0100, 64'h1111, q, c);
    check(c == 4, $sformatf("own subsystem write %0d cycles", c));
    pe(1, 1, 32'h4000_0100, 0, q, c);
    check(q == 64'h1111 && c == 4, $sformatf("own subsystem read %h %0d cycles", q, c));
    pe(2, 0, 32'h4000_0100, 64'h2222, q, c);
    pe(3, 1, 32'h4000_0100, 0, q, c);
    check(q == 64'h2222, "subsystems have separate memories");
    pe(2, 1, 32'h8000_0100, 0, q, c);
    check(q == 64'h1111 && c == 7, $sformatf("C reads subsystem 1 through bridge %h %0d cycles", q, c));
    pe(1, 1, 32'h8000_0100, 0, q, c);
    check(q == 64'h2222 && c == 7, $sformatf("B reads subsystem 2 through bridge %h %0d cycles", q, c));
    pe(3, 0, 32'h8000_0200, 64'h3333, q, c);
    pe(0, 1, 32'h4000_0200, 0, q, c);
    check(q == 64'h3333, "D writes subsystem 1");
    // both subsystems reach into each other at the same time
    for (int i = 0; i < 16; i++) begin
      pe(0, 0, 32'h4000_1000 + 32'(i*8), 64'(100 + i), q, c);
      pe(2, 0, 32'h4000_1000 + 32'(i*8), 64'(200 + i), q, c);
    end
    fork
      for (int i = 0; i < 16; i++) begin logic [63:0] d; int cc; pe(0, 1, 32'h8000_1000 + 32'(i*8), 0, d, cc); check(d == 64'(200 + i), "A reads sub 2"); end
      for (int i = 0; i < 16; i++) begin logic [63:0] d; int cc; pe(1, 1, 32'h8000_1000 + 32'(i*8), 0, d, cc); check(d == 64'(200 + i), "B reads sub 2"); end
      for (int i = 0; i < 16; i++) begin logic [63:0] d; int cc; pe(2, 1, 32'h8000_1000 + 32'(i*8), 0, d, cc); check(d == 64'(100 + i), "C reads sub 1"); end
      for (int i = 0; i < 16; i++) begin logic [63:0] d; int cc; pe(3, 1, 32'h8000_1000 + 32'(i*8), 0, d, cc); check(d == 64'(100 + i), "D reads sub 1"); end
    join
    check(retries > 0, $sformatf("bridge retries %0d", retries));
    check(both_busy > 0, $sformatf("both directions requested in %0d cycles", both_busy));
    pe(0, 1, 32'h0000_0000, 0, q, c);
    check(q == 0, "no local memory in SplitBA BANs");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
