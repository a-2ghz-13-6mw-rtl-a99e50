// wp_flipflop: write-port master-slave flip-flop, W bits wide.
//
// The original design's flip-flop is two register-file write ports in series: the
// master storage node is written through an NMOS pull-down stack while the
// clock is low, the slave while it is high, so the output takes the input
// present at the rising clock edge and holds it for the whole cycle. At the
// logic level that is a positive-edge D flip-flop, which is how it is written
// here; the clock-power saving of the circuit lives in the transistors and
// has no RTL counterpart. It has no reset, as the original design's circuit has none.
// Interface: d sampled at posedge clk, q valid right after it.
module wp_flipflop #(
  parameter int unsigned W = 1
) (
  input  logic         clk,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_ff @(posedge clk) begin
    q <= d;
  end

endmodule
