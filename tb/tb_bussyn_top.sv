// End-to-end testbench for bussyn_top at its default sizes. Each of the five
// bus systems moves one packet of 2560 samples (2048 data and 512 guard
// samples, one 64-bit word per complex sample) in the programming style that
// suits it, and the result is checked word by word:
//   BFBA     pipelined: A -> B -> C -> D through the Bi-FIFOs, each stage
//            transforming the samples, D stores them in its SRAM
//   GBAVI    pipelined in blocks: each BAN writes a block into the next
//            BAN's SRAM over the bridges and raises a REGISTERS flag; the
//            next BAN waits for the flag, transforms, passes on
//   GBAVIII  functional-parallel: each BAN produces a quarter of the packet
//            into the global memory; every BAN then checks a share of it
//   Hybrid   as GBAVIII, plus a Bi-FIFO exchange round the ring
//   SplitBA  functional-parallel in two subsystems; each pair then reads the
//            other subsystem's half through the bus bridge at the same time
// Counted mechanisms, each of which must occur: Bi-FIFO stall, bridge
// transfer into another BAN's SRAM, SRAM shared between a local and a remote
// master in the same cycle, global-bus contention, a 3-cycle global read,
// a bridge retry in SplitBA, a REGISTERS handshake.
module tb_bussyn_top;
  import bussyn_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n;
  int checks = 0, failures = 0;

  localparam int NS   = 2560;       // samples per packet
  localparam int BLK  = NS / 4;     // GBAVI block, FPA share

  pe_req_t pi [5][4];
  pe_rsp_t po [5][4];

  bussyn_top dut (
    .clk, .rst_n,
    .bfba_pe_i(pi[0]),    .bfba_pe_o(po[0]),
    .gbavi_pe_i(pi[1]),   .gbavi_pe_o(po[1]),
    .gbaviii_pe_i(pi[2]), .gbaviii_pe_o(po[2]),
    .hybrid_pe_i(pi[3]),  .hybrid_pe_o(po[3]),
    .splitba_pe_i(pi[4]), .splitba_pe_o(po[4]));

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", msg); end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one transfer of processor k of system s; cyc = cycles from ts to ta
  task automatic pe(input int s, input int k, input bit rd, input logic [31:0] a,
                    input logic [63:0] wd, output logic [63:0] q, output int cyc);
    @(negedge clk);
    pi[s][k].ts = 1; pi[s][k].rd = rd; pi[s][k].addr = a; pi[s][k].wdata = wd; pi[s][k].be = 8'hff;
    @(negedge clk);
    pi[s][k].ts = 0;
    cyc = 1;
    while (!po[s][k].ta && cyc < 5000) begin @(negedge clk); cyc++; end
    q = po[s][k].rdata;
  endtask

  task automatic wr(input int s, input int k, input logic [31:0] a, input logic [63:0] wd);
    logic [63:0] q; int c;
    pe(s, k, 0, a, wd, q, c);
  endtask

  task automatic rd(input int s, input int k, input logic [31:0] a, output logic [63:0] q);
    int c;
    pe(s, k, 1, a, 0, q, c);
  endtask

  // sample n of the packet: I in the high half, Q in the low half
  function automatic logic [63:0] sample(input int n);
    return {32'(n * 7 + 1), 32'(32'h8000_0000 - n * 3)};
  endfunction

  // ---------------- mechanism counters ----------------
  int n_fifo_stall = 0, n_bridge = 0, n_shared = 0, n_contend = 0, n_retry = 0, n_3cyc = 0, n_handshake = 0;
  always @(posedge clk) begin
    if (dut.u_bfba.g_ban[0].u_ban.fifo_stall || dut.u_bfba.g_ban[1].u_ban.fifo_stall ||
        dut.u_bfba.g_ban[2].u_ban.fifo_stall || dut.u_bfba.g_ban[3].u_ban.fifo_stall) n_fifo_stall++;
    if (dut.u_gbavi.rmt_req[0].req && dut.u_gbavi.rmt_rsp[0].ack) n_bridge++;
    if ((dut.u_gbavi.g_ban[1].u_ban.g_rmt.mm_i[0].req && dut.u_gbavi.g_ban[1].u_ban.g_rmt.mm_i[1].req) ||
        (dut.u_gbavi.g_ban[2].u_ban.g_rmt.mm_i[0].req && dut.u_gbavi.g_ban[2].u_ban.g_rmt.mm_i[1].req) ||
        (dut.u_gbavi.g_ban[3].u_ban.g_rmt.mm_i[0].req && dut.u_gbavi.g_ban[3].u_ban.g_rmt.mm_i[1].req)) n_shared++;
    if (int'(dut.u_gbaviii.g_req[0].req) + int'(dut.u_gbaviii.g_req[1].req) +
        int'(dut.u_gbaviii.g_req[2].req) + int'(dut.u_gbaviii.g_req[3].req) > 1) n_contend++;
    if (int'(dut.u_hybrid.g_req[0].req) + int'(dut.u_hybrid.g_req[1].req) +
        int'(dut.u_hybrid.g_req[2].req) + int'(dut.u_hybrid.g_req[3].req) > 1) n_contend++;
    if (dut.u_splitba.br_s_rsp[0].retry || dut.u_splitba.br_s_rsp[1].retry) n_retry++;
  end

  // ---------------- BFBA: pipelined packet ----------------
  task automatic run_bfba();
    fork
      for (int n = 0; n < NS; n++) wr(0, 0, 32'h2000_0000, sample(n));                 // A: source
      begin
        repeat (300) @(negedge clk);                                                   // B starts late
        for (int n = 0; n < NS; n++) begin logic [63:0] d; rd(0, 1, 32'h2000_0008, d); wr(0, 1, 32'h2000_0000, d + 64'd1); end
      end
      for (int n = 0; n < NS; n++) begin logic [63:0] d; rd(0, 2, 32'h2000_0008, d); wr(0, 2, 32'h2000_0000, d ^ 64'hffff); end
      for (int n = 0; n < NS; n++) begin logic [63:0] d; rd(0, 3, 32'h2000_0008, d); wr(0, 3, 32'(n * 8), d); end
    join
    for (int n = 0; n < NS; n++) begin
      logic [63:0] d;
      rd(0, 3, 32'(n * 8), d);
      check(d == ((sample(n) + 64'd1) ^ 64'hffff), $sformatf("BFBA sample %0d = %h", n, d));
    end
  endtask

  // ---------------- GBAVI: pipelined blocks over the bridges ----------------
  task automatic gbavi_stage(input int k);
    logic [63:0] d;
    for (int b = 0; b < 4; b++) begin
      if (k > 0) begin
        do rd(1, k, 32'h1000_0010, d); while (d < 64'(b + 1));                         // wait FROM_PREV
        n_handshake++;
      end
      for (int n = b * BLK; n < (b + 1) * BLK; n++) begin
        logic [63:0] v;
        if (k == 0) v = sample(n);
        else begin rd(1, k, 32'h0001_0000 + 32'(n * 8), v); v = v + 64'(k); end
        if (k < 3) wr(1, k, 32'h4001_0000 + 32'(n * 8), v);                            // next BAN's SRAM
        else       wr(1, k, 32'h0002_0000 + 32'(n * 8), v);
      end
      if (k < 3) wr(1, k, 32'h1000_0000, 64'(b + 1));                                  // TO_NEXT flag
    end
  endtask

  task automatic run_gbavi();
    for (int k = 0; k < 3; k++) wr(1, k, 32'h1000_0020, 64'h3);                       // enable both bridges
    fork
      gbavi_stage(0);
      gbavi_stage(1);
      gbavi_stage(2);
      gbavi_stage(3);
    join
    for (int n = 0; n < NS; n++) begin
      logic [63:0] d;
      rd(1, 3, 32'h0002_0000 + 32'(n * 8), d);
      check(d == sample(n) + 64'd6, $sformatf("GBAVI sample %0d = %h", n, d));
    end
  endtask

  // ---------------- GBAVIII / Hybrid: functional parallel ----------------
  task automatic fpa_share(input int s, input int k);
    for (int n = k * BLK; n < (k + 1) * BLK; n++) begin
      logic [63:0] v;
      wr(s, k, 32'(n * 8), sample(n));                                                // local working copy
      rd(s, k, 32'(n * 8), v);
      wr(s, k, 32'h4000_0000 + 32'(n * 8), ~v);                                        // result to global memory
    end
  endtask

  task automatic fpa_check(input int s, input int k, input string name);
    for (int n = 0; n < NS; n += 4) begin
      logic [63:0] d;
      rd(s, k, 32'h4000_0000 + 32'(((n + k * 7) % NS) * 8), d);
      check(d == ~sample((n + k * 7) % NS), $sformatf("%s sample %0d", name, (n + k * 7) % NS));
    end
  endtask

  task automatic run_fpa(input int s, input string name);
    begin
      logic [63:0] q; int c;
      wr(s, 0, 32'h4000_fff8, 64'h0123);
      pe(s, 1, 1, 32'h4000_fff8, 0, q, c);
      check(q == 64'h0123 && c == 6, $sformatf("%s uncontended global read %0d cycles", name, c));
      if (c == 6) n_3cyc++;
    end
    fork
      fpa_share(s, 0); fpa_share(s, 1); fpa_share(s, 2); fpa_share(s, 3);
    join
    fork
      fpa_check(s, 0, name); fpa_check(s, 1, name); fpa_check(s, 2, name); fpa_check(s, 3, name);
    join
  endtask

  task automatic run_hybrid_ring();
    fork
      for (int i = 0; i < 32; i++) begin logic [63:0] d; wr(3, 0, 32'h2000_0000, 64'(i));        rd(3, 0, 32'h2000_0008, d); check(d == 64'(300 + i), "Hybrid A from D"); end
      for (int i = 0; i < 32; i++) begin logic [63:0] d; wr(3, 1, 32'h2000_0000, 64'(100 + i));  rd(3, 1, 32'h2000_0008, d); check(d == 64'(i), "Hybrid B from A"); end
      for (int i = 0; i < 32; i++) begin logic [63:0] d; wr(3, 2, 32'h2000_0000, 64'(200 + i));  rd(3, 2, 32'h2000_0008, d); check(d == 64'(100 + i), "Hybrid C from B"); end
      for (int i = 0; i < 32; i++) begin logic [63:0] d; wr(3, 3, 32'h2000_0000, 64'(300 + i));  rd(3, 3, 32'h2000_0008, d); check(d == 64'(200 + i), "Hybrid D from C"); end
    join
  endtask

  // ---------------- SplitBA ----------------
  task automatic split_share(input int k);
    for (int n = k * BLK; n < (k + 1) * BLK; n++)
      wr(4, k, 32'h4000_0000 + 32'(n * 8), sample(n) + 64'(k));
  endtask

  task automatic split_check(input int k);
    // processors of one subsystem read the other subsystem's half
    int lo = (k < 2) ? 2 * BLK : 0;
    for (int n = lo + (k % 2); n < lo + 2 * BLK; n += 8) begin
      logic [63:0] d;
      rd(4, k, 32'h8000_0000 + 32'(n * 8), d);
      check(d == sample(n) + 64'(n / BLK), $sformatf("SplitBA BAN %0d sample %0d = %h", k, n, d));
    end
  endtask

  task automatic run_splitba();
    fork split_share(0); split_share(1); split_share(2); split_share(3); join
    fork split_check(0); split_check(1); split_check(2); split_check(3); join
  endtask

  int t0;
  initial begin
    foreach (pi[s, k]) pi[s][k] = '0;
    rst_n = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    t0 = $time;
    fork
      run_bfba();
      run_gbavi();
      run_fpa(2, "GBAVIII");
      begin run_fpa(3, "Hybrid"); run_hybrid_ring(); end
      run_splitba();
    join
    $display("packet of %0d samples through all five systems in %0d cycles", NS, ($time - t0) / 10);
    $display("mechanisms: fifo_stall=%0d bridge=%0d shared_sram=%0d contention=%0d retry=%0d read3=%0d handshake=%0d",
             n_fifo_stall, n_bridge, n_shared, n_contend, n_retry, n_3cyc, n_handshake);
    check(n_fifo_stall > 0, "Bi-FIFO stall never happened");
    check(n_bridge > 0,     "no transfer over GBAVI bridges");
    check(n_shared > 0,     "SRAM never shared by local and remote master at once");
    check(n_contend > 0,    "no global-bus contention");
    check(n_retry > 0,      "no SplitBA bridge retry");
    check(n_3cyc == 2,      "3-cycle global read not seen in both GBAVIII and Hybrid");
    check(n_handshake > 0,  "no REGISTERS handshake");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
