// Testbench for mbi_sram with an sram behind it: address mapping addr[22:3],
// byte-enable writes, read-back, two-cycle transfer, no action without sel.
module tb_mbi_sram;
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

  bus_req_t m;
  bus_rsp_t r;
  logic sel;
  logic cs, we; logic [7:0] be; logic [19:0] sa; logic [63:0] sd, sq;
  mbi_sram #(.MEM_AW(20)) dut (.clk, .rst_n, .bus_i(m), .sel, .bus_o(r),
    .sram_cs(cs), .sram_we(we), .sram_be(be), .sram_addr(sa), .sram_din(sd), .sram_dout(sq));
  sram #(.ADDR_W(20)) u_mem (.clk, .sram_cs(cs), .sram_we(we), .sram_be(be), .sram_addr(sa),
    .sram_din(sd), .sram_dout(sq));
  logic [63:0] model [int];
  initial begin
    logic [63:0] d; int c;
    m = '0; sel = 1; rst_n = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 40; i++) begin
      int w = int'($urandom_range(0, 20'hfffff));
      logic [31:0] a = {9'd0, 20'(w), 3'd0};
      logic [63:0] v = {$urandom, $urandom};
      xfer(1, a, v, 8'hff, d, c);
      check(c == 2, $sformatf("write cycles %0d", c));
      model[w] = v;
      xfer(1, a, ~v, 8'h0f, d, c);
      model[w][31:0] = ~v[31:0];
      xfer(0, a | 32'h7, 0, 8'hff, d, c);
      check(c == 2, $sformatf("read cycles %0d", c));
      check(d == model[w], $sformatf("read word %h got %h exp %h", w, d, model[w]));
    end
    // addr bits above 22 are not part of the SRAM address
    xfer(1, 32'h0080_0008, 64'h1234, 8'hff, d, c);
    xfer(0, 32'h0000_0008, 0, 8'hff, d, c);
    check(d == 64'h1234, "bit 23 ignored, word 1 written");
    // without sel nothing happens
    @(negedge clk); sel = 0; m.req = 1; m.we = 1; m.addr = 32'h8; m.wdata = 64'h5555; m.be = 8'hff;
    repeat (3) begin @(negedge clk); check(!r.ack && !cs, "no ack without sel"); end
    m.req = 0; sel = 1;
    xfer(0, 32'h8, 0, 8'hff, d, c);
    check(d == 64'h1234, "unselected write had no effect");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
