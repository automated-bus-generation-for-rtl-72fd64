// Testbench for sram: random byte-enable writes, checked reads against a
// reference model, one-cycle read latency and output hold.
module tb_sram;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        cs, we;
  logic [7:0]  be;
  logic [19:0] addr;
  logic [63:0] din, dout;
  logic [63:0] model [int];

  sram dut (.clk, .sram_cs(cs), .sram_we(we), .sram_be(be), .sram_addr(addr),
            .sram_din(din), .sram_dout(dout));

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

  int addrs [64];
  initial begin
    cs = 0; we = 0; be = 0; addr = 0; din = 0;
    foreach (addrs[i]) addrs[i] = (i == 63) ? 20'hfffff : int'($urandom_range(0, 20'hfffff));
    // full writes
    foreach (addrs[i]) begin
      @(negedge clk);
      cs = 1; we = 1; be = 8'hff; addr = 20'(addrs[i]); din = {$urandom, $urandom};
      model[addrs[i]] = din;
    end
    // partial writes
    foreach (addrs[i]) begin
      logic [63:0] m;
      @(negedge clk);
      cs = 1; we = 1; be = 8'($urandom); addr = 20'(addrs[i]); din = {$urandom, $urandom};
      m = model[addrs[i]];
      for (int b = 0; b < 8; b++) if (be[b]) m[b*8 +: 8] = din[b*8 +: 8];
      model[addrs[i]] = m;
    end
    // reads, one cycle latency
    foreach (addrs[i]) begin
      @(negedge clk);
      cs = 1; we = 0; addr = 20'(addrs[i]);
      @(negedge clk);
      cs = 0;
      check(dout == model[addrs[i]], $sformatf("read %h got %h exp %h", addrs[i], dout, model[addrs[i]]));
      @(negedge clk);
      check(dout == model[addrs[i]], "dout holds while idle");
    end
    // a write does not change dout
    @(negedge clk); cs = 1; we = 1; be = 8'hff; addr = 20'(addrs[0]); din = ~model[addrs[0]];
    @(negedge clk); cs = 0;
    check(dout == model[addrs[63]], "write leaves dout unchanged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
