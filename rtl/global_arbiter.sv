// Global arbiter of a shared bus. Round robin among N masters: when the bus
// is free, the arbiter registers a one-hot grant for the first requesting
// master after the one granted last. The grant stays until the granted
// transfer ends (done = ack or retry from the slave), then the bus is free
// again for one cycle before the next grant.
//
// Timing: a request raised in cycle 0 on an idle bus is granted in cycle 1.
// With the two-cycle memory interface behind it, an uncontended read on the
// global bus therefore takes 3 cycles from request to data, the read
// arbitration time the generated global buses are credited with. The
// round-robin policy is this design's choice.
module global_arbiter #(
  parameter int unsigned N = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic         done,
  output logic [N-1:0] gnt
);

  logic [$clog2(N > 1 ? N : 2)-1:0] last;
  logic [N-1:0]                     pick;
  logic                             found;

  always_comb begin
    pick  = '0;
    found = 1'b0;
    for (int unsigned k = 1; k <= N; k++) begin
      if (!found && req[(int'(last) + k) % N]) begin
        pick[(int'(last) + k) % N] = 1'b1;
        found = 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      gnt  <= '0;
      last <= '0;
    end else if (gnt != '0) begin
      if (done) gnt <= '0;
    end else if (found) begin
      gnt <= pick;
      for (int unsigned c = 0; c < N; c++)
        if (pick[c]) last <= ($bits(last))'(c);
    end
  end

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt));

endmodule
