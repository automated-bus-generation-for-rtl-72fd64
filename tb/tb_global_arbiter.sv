// Testbench for global_arbiter: one-cycle grant, grant held until done,
// round-robin order, one-hot grant.
module tb_global_arbiter;
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

  logic [3:0] req, gnt; logic done;
  global_arbiter #(.N(4)) dut (.clk, .rst_n, .req, .done, .gnt);
  initial begin
    int order [$];
    req = 0; done = 0; rst_n = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    check(gnt == 0, "no grant after reset");
    req = 4'b0100;
    @(negedge clk);
    check(gnt == 4'b0100, "grant one cycle after request");
    req = 4'b1111;
    repeat (3) begin @(negedge clk); check(gnt == 4'b0100, "grant held until done"); end
    done = 1; @(negedge clk); done = 0; req[2] = 0;
    check(gnt == 0, "bus free for one cycle after done");
    // round robin from master 2: expect 3, 0, 1
    for (int i = 0; i < 3; i++) begin
      @(negedge clk);
      check($onehot(gnt), "one-hot");
      for (int k = 0; k < 4; k++) if (gnt[k]) order.push_back(k);
      done = 1; @(negedge clk); done = 0;
      for (int k = 0; k < 4; k++) if (gnt[k]) req[k] = 0;
      req = req & ~(4'(1) << order[$]);
    end
    check(order.size() == 3 && order[0] == 3 && order[1] == 0 && order[2] == 1,
          $sformatf("round robin order %p", order));
    // fairness under constant requests
    begin
      int cnt [4] = '{0, 0, 0, 0};
      req = 4'b1111;
      for (int i = 0; i < 40; i++) begin
        @(negedge clk);
        for (int k = 0; k < 4; k++) if (gnt[k]) cnt[k]++;
        done = 1; @(negedge clk); done = 0;
      end
      for (int k = 0; k < 4; k++) check(cnt[k] == 10, $sformatf("master %0d granted %0d of 40", k, cnt[k]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
