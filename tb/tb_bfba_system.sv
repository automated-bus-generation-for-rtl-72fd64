// Testbench for bfba_system: a four-stage pipeline round the Bi-FIFO ring
// (A -> B -> C -> D -> A, each stage adding its BAN number), a queue that
// fills and stalls the sender, REGISTERS handshakes between neighbours and
// private local memories.
module tb_bfba_system;
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
  bfba_system dut (.clk, .rst_n, .pe_i, .pe_o);

  int stall_cycles = 0;
  always @(posedge clk) if (dut.g_ban[0].u_ban.fifo_stall || dut.g_ban[1].u_ban.fifo_stall ||
                            dut.g_ban[2].u_ban.fifo_stall || dut.g_ban[3].u_ban.fifo_stall) stall_cycles++;
  localparam int NW = 40;
  initial begin
    logic [63:0] q; int c;
    foreach (pe_i[k]) pe_i[k] = '0; rst_n = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    // private memories: same address, different data
    for (int k = 0; k < 4; k++) pe(k, 0, 32'h0000_0080, 64'(k * 11), q, c);
    for (int k = 0; k < 4; k++) begin
      pe(k, 1, 32'h0000_0080, 0, q, c);
      check(q == 64'(k * 11) && c == 3, $sformatf("BAN %0d private word %0d, %0d cycles", k, q, c));
    end
    // REGISTERS: each BAN writes TO_NEXT = 100+k; next BAN sees it as FROM_PREV
    for (int k = 0; k < 4; k++) pe(k, 0, 32'h1000_0000, 64'(100 + k), q, c);
    for (int k = 0; k < 4; k++) begin
      pe(k, 1, 32'h1000_0010, 0, q, c);
      check(q == 64'(100 + (k + 3) % 4), $sformatf("BAN %0d FROM_PREV %0d", k, q));
    end
    for (int k = 0; k < 4; k++) pe(k, 0, 32'h1000_0008, 64'(200 + k), q, c);
    for (int k = 0; k < 4; k++) begin
      pe(k, 1, 32'h1000_0018, 0, q, c);
      check(q == 64'(200 + (k + 1) % 4), $sformatf("BAN %0d FROM_NEXT %0d", k, q));
    end
    // pipeline: A produces NW words; B, C, D add 1, 2, 3 and pass on; A collects
    fork
      begin   // A: one processor, so it sends all words, then collects
        for (int i = 0; i < NW; i++) begin logic [63:0] d; int cc; pe(0, 0, 32'h2000_0000, 64'(i * 1000), d, cc); end
        for (int i = 0; i < NW; i++) begin logic [63:0] d; int cc; pe(0, 1, 32'h2000_0008, 0, d, cc);
          check(d == 64'(i * 1000 + 6), $sformatf("pipeline result %0d = %0d", i, d)); end
      end
      begin
        repeat (200) @(negedge clk);   // B starts late: A's queue fills
        for (int i = 0; i < NW; i++) begin logic [63:0] d; int cc; pe(1, 1, 32'h2000_0008, 0, d, cc); pe(1, 0, 32'h2000_0000, d + 1, d, cc); end
      end
      for (int i = 0; i < NW; i++) begin logic [63:0] d; int cc; pe(2, 1, 32'h2000_0008, 0, d, cc); pe(2, 0, 32'h2000_0000, d + 2, d, cc); end
      for (int i = 0; i < NW; i++) begin logic [63:0] d; int cc; pe(3, 1, 32'h2000_0008, 0, d, cc); pe(3, 0, 32'h2000_0000, d + 3, d, cc); end
    join
    check(stall_cycles > 100, $sformatf("Bi-FIFO stall cycles %0d", stall_cycles));
    // backwards: D sends to previous (C)
    pe(3, 0, 32'h2000_0008, 64'h5151, q, c);
    pe(2, 1, 32'h2000_0000, 0, q, c);
    check(q == 64'h5151, "D to previous arrives at C");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
