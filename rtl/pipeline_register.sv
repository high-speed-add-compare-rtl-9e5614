// State-metric pipeline register.
//
// 16 x 8 = 128 positive-edge D flip-flops that close the ACS loop: every rising clock
// edge the new state metrics NSM become the state metrics SM of the next trellis step.
// The active-low asynchronous reset RB loads the start condition of a frame: state 0
// (reset flip-flops) gets metric 0 and states 1..15 (preset flip-flops) get the largest
// metric, 255, so that decoding starts from the all-zero encoder state.
//
// Timing: SM changes one clock-to-Q delay after each rising edge of clk.
// The register size and the two flip-flop types follow the published design; which
// state uses which flip-flop type (and so the start metrics) is this design's choice.
module pipeline_register
  import viterbi_pkg::*;
(
  input  logic clk,
  input  logic rb,
  input  sm_t  nsm [N_STATES],
  output sm_t  sm  [N_STATES]
);

  dff_ar #(.W(SM_W)) u_state0 (.clk(clk), .rb(rb), .d(nsm[0]), .q(sm[0]));

  for (genvar j = 1; j < N_STATES; j++) begin : g_state
    dff_as #(.W(SM_W)) u_state (.clk(clk), .rb(rb), .d(nsm[j]), .q(sm[j]));
  end

endmodule
