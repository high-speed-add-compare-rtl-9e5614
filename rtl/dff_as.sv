// D flip-flop with active-low asynchronous set (preset).
//
// Positive-edge-triggered; while RB = 0 the output is forced to 1, with RB = 1 it
// captures D on every rising clock edge. W cells side by side share clock and set.
// This is the logic function of the preset flip-flop cell used in the state-metric
// pipeline register; the transistor circuit itself is not modelled.
module dff_as #(
  parameter int unsigned W = 1
) (
  input  logic         clk,
  input  logic         rb,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_ff @(posedge clk or negedge rb) begin
    if (!rb) q <= '1;
    else     q <= d;
  end

endmodule
