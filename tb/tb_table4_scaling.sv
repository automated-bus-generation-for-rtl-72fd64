// Testbench for the larger bus systems: BFBA, GBAVI, GBAVIII, Hybrid and
// SplitBA built with 8 processors each, side by side (SplitBA as two
// subsystems of 4). The sizes loop can be widened to 16 or 24 processors
// (NSIZE); each size adds a full set of systems and lengthens the C++
// build by several minutes, while the simulation stays under a second. The generator is meant to
// produce these sizes from the same module library. Memories are kept small
// (1024 local words, 4096 global words) because only the wiring of the
// rings and the width of the global arbiter change with N_BAN.
//
// For every size it checks:
//  * BFBA and Hybrid: a word sent to the next BAN's Bi-FIFO arrives, all the
//    way round the ring, including the wrap from the last BAN to the first;
//  * GBAVI: each BAN enables its two bridges and writes into the next BAN's
//    memory in 8 cycles, and the next BAN finds the word in its own memory;
//  * GBAVIII and Hybrid: all BANs write the global memory at the same time;
//    every transfer completes, the round-robin arbiter bounds the wait of each
//    one, every BAN reads back any other BAN's words, and an uncontended
//    global read takes 6 cycles;
//  * SplitBA: every processor writes its own subsystem's memory, then all
//    of them read the other subsystem's words through the bridge at once;
//    the data is right, and opposing transfers were answered with retry.
module tb_table4_scaling;
  import bussyn_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n;
  int checks = 0, failures = 0;
  localparam int NSIZE = 1;
  int sizes_done = 0;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (sizes_done == NSIZE);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar s = 0; s < NSIZE; s++) begin : g_sz
    localparam int NB = 8 * (s + 1);
    localparam int BURST = 8;

    pe_req_t bf_i [NB]; pe_rsp_t bf_o [NB];
    pe_req_t gv_i [NB]; pe_rsp_t gv_o [NB];
    pe_req_t g3_i [NB]; pe_rsp_t g3_o [NB];
    pe_req_t hy_i [NB]; pe_rsp_t hy_o [NB];
    pe_req_t sp_i [NB]; pe_rsp_t sp_o [NB];

    bfba_system #(.N_BAN(NB), .MEM_AW(10), .FIFO_DEPTH(4)) u_bfba
      (.clk, .rst_n, .pe_i(bf_i), .pe_o(bf_o));
    gbavi_system #(.N_BAN(NB), .MEM_AW(10)) u_gbavi
      (.clk, .rst_n, .pe_i(gv_i), .pe_o(gv_o));
    gbaviii_system #(.N_BAN(NB), .LOCAL_AW(10), .GLOBAL_AW(12)) u_gbaviii
      (.clk, .rst_n, .pe_i(g3_i), .pe_o(g3_o));
    hybrid_system #(.N_BAN(NB), .LOCAL_AW(10), .GLOBAL_AW(12), .FIFO_DEPTH(4)) u_hybrid
      (.clk, .rst_n, .pe_i(hy_i), .pe_o(hy_o));
    splitba_system #(.GLOBAL_AW(12), .N_PE_SUB(NB / 2)) u_splitba
      (.clk, .rst_n, .pe_i(sp_i), .pe_o(sp_o));

    int n_retry = 0;
    always @(posedge clk)
      if (u_splitba.br_s_rsp[0].retry || u_splitba.br_s_rsp[1].retry) n_retry++;

    // one single-beat transfer on processor port k of system sys
    // (0 BFBA, 1 GBAVI, 2 GBAVIII, 3 Hybrid, 4 SplitBA); cyc = cycles from ts to ta
    task automatic pe(input int sys, input int k, input bit rd, input logic [31:0] a,
                      input logic [63:0] wd, output logic [63:0] q, output int cyc);
      pe_req_t r;
      pe_rsp_t o;
      r = '{ts: 1'b1, rd: rd, addr: a, wdata: wd, be: 8'hff};
      @(negedge clk);
      case (sys)
        0: bf_i[k] = r;
        1: gv_i[k] = r;
        2: g3_i[k] = r;
        3: hy_i[k] = r;
        default: sp_i[k] = r;
      endcase
      @(negedge clk);
      case (sys)
        0: bf_i[k].ts = 0;
        1: gv_i[k].ts = 0;
        2: g3_i[k].ts = 0;
        3: hy_i[k].ts = 0;
        default: sp_i[k].ts = 0;
      endcase
      cyc = 1;
      forever begin
        case (sys)
          0: o = bf_o[k];
          1: o = gv_o[k];
          2: o = g3_o[k];
          3: o = hy_o[k];
          default: o = sp_o[k];
        endcase
        if (o.ta || cyc >= 5000) break;
        @(negedge clk);
        cyc++;
      end
      q = o.rdata;
    endtask

    function automatic logic [63:0] tag(input int sys, input int k, input int i);
      return 64'(NB) << 48 | 64'(sys) << 40 | 64'(k) << 16 | 64'(i);
    endfunction

    // concurrent global-memory writers, one per BAN, for GBAVIII and Hybrid
    int go_glb = 0;
    int glb_done = 0;
    int glb_worst = 0;
    int go_sp = 0;
    int sp_done = 0;
    int sp_bad = 0;
    for (genvar k = 0; k < NB; k++) begin : g_m
      // SplitBA: processor k reads the words its partner k' in the other
      // subsystem wrote; k' is at the same position there
      initial begin
        logic [63:0] q; int c; int kp;
        sp_i[k] = '0;
        kp = (k + NB / 2) % NB;
        wait (go_sp == 1);
        for (int i = 0; i < BURST; i++) begin
          pe(4, k, 1, 32'h8000_0000 + 32'(((kp % (NB / 2)) * BURST + i) * 8), 0, q, c);
          if (q != tag(4, kp, i)) sp_bad++;
        end
        sp_done++;
      end
      initial begin
        logic [63:0] q; int c;
        g3_i[k] = '0; hy_i[k] = '0;
        wait (go_glb == 1);
        for (int i = 0; i < BURST; i++) begin
          pe(2, k, 0, 32'h4000_0000 + 32'((k * BURST + i) * 8), tag(2, k, i), q, c);
          if (c > glb_worst) glb_worst = c;
          pe(3, k, 0, 32'h4000_0000 + 32'((k * BURST + i) * 8), tag(3, k, i), q, c);
          if (c > glb_worst) glb_worst = c;
        end
        glb_done++;
      end
    end

    initial begin
      logic [63:0] q; int c; int j;
      foreach (bf_i[k]) bf_i[k] = '0;
      foreach (gv_i[k]) gv_i[k] = '0;
      @(posedge rst_n);
      repeat (2) @(negedge clk);

      // Bi-FIFO rings: every BAN sends one word to the next, then every BAN
      // receives the word its previous BAN sent (BAN 0 from BAN NB-1)
      for (int k = 0; k < NB; k++) begin
        pe(0, k, 0, 32'h2000_0000, tag(0, k, 1), q, c);
        pe(3, k, 0, 32'h2000_0000, tag(3, k, 1), q, c);
      end
      for (int k = 0; k < NB; k++) begin
        j = (k + NB - 1) % NB;
        pe(0, k, 1, 32'h2000_0008, 0, q, c);
        check(q == tag(0, j, 1), $sformatf("N=%0d BFBA BAN %0d got %h from BAN %0d", NB, k, q, j));
        pe(3, k, 1, 32'h2000_0008, 0, q, c);
        check(q == tag(3, j, 1), $sformatf("N=%0d Hybrid BAN %0d got %h from BAN %0d", NB, k, q, j));
      end

      // GBAVI: enable both bridges of every BAN, write into the next BAN
      for (int k = 0; k < NB; k++) pe(1, k, 0, 32'h1000_0020, 64'h3, q, c);
      for (int k = 0; k < NB; k++) begin
        pe(1, k, 0, 32'h4000_0040, tag(1, k, 2), q, c);
        check(c == 8, $sformatf("N=%0d GBAVI BAN %0d remote write %0d cycles", NB, k, c));
      end
      for (int k = 0; k < NB; k++) begin
        j = (k + NB - 1) % NB;
        pe(1, k, 1, 32'h0000_0040, 0, q, c);
        check(q == tag(1, j, 2), $sformatf("N=%0d GBAVI BAN %0d memory %h", NB, k, q));
      end

      // global memory: all BANs at once, then cross reads
      go_glb = 1;
      wait (glb_done == NB);
      // round robin: a waiting BAN is served after at most one transfer of
      // each other BAN; with the bus saturated a tenure takes 3 cycles, so
      // no processor waits more than 3 * N_BAN + 3 cycles for its ta
      check(glb_worst > 6, $sformatf("N=%0d global bus contention seen (%0d)", NB, glb_worst));
      check(glb_worst <= 3 * NB + 3,
            $sformatf("N=%0d worst global write %0d cycles", NB, glb_worst));
      for (int k = 0; k < NB; k++) begin
        j = (k * 5 + 3) % NB;
        for (int i = 0; i < BURST; i += 3) begin
          pe(2, k, 1, 32'h4000_0000 + 32'((j * BURST + i) * 8), 0, q, c);
          check(q == tag(2, j, i) && c == 6,
                $sformatf("N=%0d GBAVIII BAN %0d read BAN %0d word %0d: %h in %0d", NB, k, j, i, q, c));
          pe(3, k, 1, 32'h4000_0000 + 32'((j * BURST + i) * 8), 0, q, c);
          check(q == tag(3, j, i) && c == 6,
                $sformatf("N=%0d Hybrid BAN %0d read BAN %0d word %0d: %h in %0d", NB, k, j, i, q, c));
        end
      end
      // SplitBA: each processor fills its part of its subsystem's memory
      for (int k = 0; k < NB; k++)
        for (int i = 0; i < BURST; i++)
          pe(4, k, 0, 32'h4000_0000 + 32'(((k % (NB / 2)) * BURST + i) * 8), tag(4, k, i), q, c);
      go_sp = 1;
      wait (sp_done == NB);
      check(sp_bad == 0, $sformatf("N=%0d SplitBA cross reads, %0d wrong", NB, sp_bad));
      check(n_retry > 0, $sformatf("N=%0d SplitBA opposing transfers retried %0d times", NB, n_retry));
      $display("N=%0d done, worst global write %0d cycles, %0d SplitBA retries", NB, glb_worst, n_retry);
      sizes_done++;
    end
  end
endmodule
