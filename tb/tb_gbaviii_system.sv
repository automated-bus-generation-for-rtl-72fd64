// Testbench for gbaviii_system: private local memories, the shared global
// memory read in 3 global-bus cycles (6 at the processor), all four BANs
// writing the global memory at once, memory sizes.
module tb_gbaviii_system;
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
  gbaviii_system dut (.clk, .rst_n, .pe_i, .pe_o);

  int contention = 0;
  always @(posedge clk)
    if (int'(dut.g_req[0].req) + int'(dut.g_req[1].req) + int'(dut.g_req[2].req) + int'(dut.g_req[3].req) > 1) contention++;

  initial begin
    logic [63:0] q; int c;
    foreach (pe_i[k]) pe_i[k] = '0; rst_n = 0;
    repeat (2) @(negedge clk); rst_n = 1;

    for (int k = 0; k < 4; k++) pe(k, 0, 32'h0000_0080, 64'(k * 11), q, c);
    for (int k = 0; k < 4; k++) begin
      pe(k, 1, 32'h0000_0080, 0, q, c);
      check(q == 64'(k * 11) && c == 3, $sformatf("BAN %0d local word %0d, %0d cycles", k, q, c));
    end
    pe(0, 0, 32'h4000_0040, 64'h9999, q, c);
    for (int k = 1; k < 4; k++) begin
      pe(k, 1, 32'h4000_0040, 0, q, c);
      check(q == 64'h9999 && c == 6, $sformatf("BAN %0d global read %h, %0d cycles", k, q, c));
    end

    // functional-parallel style: every BAN fills its share of the global memory at once
    fork
      for (int i = 0; i < 16; i++) begin logic [63:0] d; int cc; pe(0, 0, 32'h4000_8000 + 32'(i*32),      64'(i),       d, cc); end
      for (int i = 0; i < 16; i++) begin logic [63:0] d; int cc; pe(1, 0, 32'h4000_8000 + 32'(i*32 + 8),  64'(i + 100), d, cc); end
      for (int i = 0; i < 16; i++) begin logic [63:0] d; int cc; pe(2, 0, 32'h4000_8000 + 32'(i*32 + 16), 64'(i + 200), d, cc); end
      for (int i = 0; i < 16; i++) begin logic [63:0] d; int cc; pe(3, 0, 32'h4000_8000 + 32'(i*32 + 24), 64'(i + 300), d, cc); end
    join
    check(contention > 20, $sformatf("global bus contention cycles %0d", contention));
    for (int k = 0; k < 4; k++)
      for (int i = 0; i < 64; i += 5) begin
        pe(k, 1, 32'h4000_8000 + 32'(i*8), 0, q, c);
        check(q == 64'((i % 4) * 100 + i / 4), $sformatf("BAN %0d global word %0d = %0d", k, i, q));
      end
    // last word of the 16 MB global memory and of a 4 MB local memory
    pe(2, 0, 32'h40ff_fff8, 64'h4242, q, c);
    pe(1, 1, 32'h40ff_fff8, 0, q, c);
    check(q == 64'h4242, "top of global memory");
    pe(3, 0, 32'h003f_fff8, 64'h2424, q, c);
    pe(3, 1, 32'h003f_fff8, 0, q, c);
    check(q == 64'h2424, "top of local memory");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
