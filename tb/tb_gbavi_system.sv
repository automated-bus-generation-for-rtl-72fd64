// Testbench for gbavi_system: each BAN enables its two bridges through its
// REGISTERS and writes into the next BAN's memory while that BAN works on
// its own memory; data passes round the ring; latencies.
module tb_gbavi_system;
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
  gbavi_system dut (.clk, .rst_n, .pe_i, .pe_o);

  int both = 0;
  always @(posedge clk)
    if ((dut.g_ban[0].u_ban.g_rmt.mm_i[0].req && dut.g_ban[0].u_ban.g_rmt.mm_i[1].req) ||
        (dut.g_ban[1].u_ban.g_rmt.mm_i[0].req && dut.g_ban[1].u_ban.g_rmt.mm_i[1].req) ||
        (dut.g_ban[2].u_ban.g_rmt.mm_i[0].req && dut.g_ban[2].u_ban.g_rmt.mm_i[1].req) ||
        (dut.g_ban[3].u_ban.g_rmt.mm_i[0].req && dut.g_ban[3].u_ban.g_rmt.mm_i[1].req)) both++;
  initial begin
    logic [63:0] q; int c;
    foreach (pe_i[k]) pe_i[k] = '0; rst_n = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int k = 0; k < 4; k++) pe(k, 0, 32'h1000_0020, 64'h3, q, c);
    pe(0, 0, 32'h4000_0100, 64'haaaa, q, c);
    check(c == 8, $sformatf("remote write to next BAN %0d cycles", c));
    pe(1, 1, 32'h0000_0100, 0, q, c);
    check(q == 64'haaaa, "BAN B reads what A wrote");
    pe(0, 1, 32'h4000_0100, 0, q, c);
    check(q == 64'haaaa && c == 8, $sformatf("remote read %0d cycles", c));
    fork
      for (int i = 0; i < 16; i++) begin logic [63:0] d; int cc; pe(0, 0, 32'h4000_1000 + 32'(i*8), 64'(0 * 100 + i), d, cc); end
      for (int i = 0; i < 16; i++) begin logic [63:0] d; int cc; pe(1, 0, 32'h4000_1000 + 32'(i*8), 64'(1 * 100 + i), d, cc); end
      for (int i = 0; i < 16; i++) begin logic [63:0] d; int cc; pe(2, 0, 32'h4000_1000 + 32'(i*8), 64'(2 * 100 + i), d, cc); end
      for (int i = 0; i < 16; i++) begin logic [63:0] d; int cc; pe(3, 0, 32'h4000_1000 + 32'(i*8), 64'(3 * 100 + i), d, cc); end
    join
    // each BAN reads what its previous BAN wrote, then passes a token on
    for (int k = 0; k < 4; k++)
      for (int i = 0; i < 16; i++) begin
        pe(k, 1, 32'h0000_1000 + 32'(i*8), 0, q, c);
        check(q == 64'(((k + 3) % 4) * 100 + i), $sformatf("BAN %0d word %0d = %0d", k, i, q));
      end
    // token round the ring: each BAN reads its word and writes it +1 to the next
    pe(0, 0, 32'h4000_2000, 64'd1, q, c);
    for (int k = 1; k < 4; k++) begin
      pe(k, 1, 32'h0000_2000, 0, q, c);
      pe(k, 0, 32'h4000_2000, q + 1, q, c);
    end
    pe(0, 1, 32'h0000_2000, 0, q, c);
    check(q == 64'd4, $sformatf("token after one round %0d", q));
    // remote traffic and local traffic at the same memory
    both = 0;
    fork
      for (int i = 0; i < 20; i++) begin logic [63:0] d; int cc; pe(0, 0, 32'h4000_3000 + 32'(i*8), 64'(i), d, cc); end
      for (int i = 0; i < 40; i++) begin logic [63:0] d; int cc; pe(1, 1, 32'h0000_0100, 0, d, cc); end
    join
    check(both > 0, $sformatf("memory shared by local and remote masters in %0d cycles", both));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
