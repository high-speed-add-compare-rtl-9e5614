// D flip-flop with active-low asynchronous reset.
//
// Positive-edge-triggered; while RB = 0 the output is forced to 0, with RB = 1 it
// captures D on every rising clock edge. W cells side by side share clock and reset.
// This is the logic function of the reset flip-flop cell used in the state-metric
// pipeline register and the path memory; the transistor circuit itself is not modelled.
module dff_ar #(
  parameter int unsigned W = 1
) (
  input  logic         clk,
  input  logic         rb,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_ff @(posedge clk or negedge rb) begin
    if (!rb) q <= '0;
    else     q <= d;
  end

endmodule
