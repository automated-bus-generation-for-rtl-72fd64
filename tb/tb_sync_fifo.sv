// Testbench for sync_fifo: order, full/empty/count, simultaneous push/pop,
// against a queue model.
module tb_sync_fifo;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst_n, push, pop, full, empty;
  logic [63:0] din, dout;
  logic [4:0] count;
  logic [63:0] q [$];

  sync_fifo #(.DEPTH(16), .WIDTH(64)) dut (.clk, .rst_n, .push, .din, .pop, .dout, .full, .empty, .count);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; push = 0; pop = 0; din = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    check(empty && !full && count == 0, "empty after reset");
    for (int i = 0; i < 16; i++) begin
      @(negedge clk); push = 1; din = {$urandom, $urandom}; q.push_back(din);
    end
    @(negedge clk); push = 0;
    check(full && count == 16, "full after 16 pushes");
    for (int i = 0; i < 400; i++) begin
      bit pu, po;
      @(negedge clk);
      check(count == 5'(q.size()), $sformatf("count %0d exp %0d", count, q.size()));
      check(empty == (q.size() == 0) && full == (q.size() == 16), "flags");
      if (q.size() > 0) check(dout == q[0], $sformatf("head %h exp %h", dout, q[0]));
      pu = $urandom_range(0, 1) && q.size() < 16;
      po = $urandom_range(0, 1) && q.size() > 0;
      push = pu; pop = po; din = {$urandom, $urandom};
      if (po) void'(q.pop_front());
      if (pu) q.push_back(din);
    end
    @(negedge clk); push = 0; pop = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
