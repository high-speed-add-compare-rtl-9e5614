// State-parallel ACS block.
//
// Sixteen ACS units, one per trellis state, update all state metrics in one step.
// A state j holds the last four input bits with the newest in bit 0, so the input bit
// on every branch into j is j[0] and its two predecessors are
//     upper: {0, j[3:1]}      lower: {1, j[3:1]}.
// The branch metric for each edge is selected by the code pair the encoder emits on
// that edge (viterbi_pkg::branch_code); because the pair depends only on the states,
// this selection is fixed wiring. PS[j] = 1 means the lower predecessor survived.
//
// Timing: combinational; sm comes from the pipeline register, nsm goes back to it.
// The unit count and metric widths follow the published decoder; the trellis labelling
// and the code generators are this design's choice.
module acs_array
  import viterbi_pkg::*;
(
  input  bm_t  bm  [N_BM],
  input  sm_t  sm  [N_STATES],
  output sm_t  nsm [N_STATES],
  output logic [N_STATES-1:0] ps
);

  for (genvar j = 0; j < N_STATES; j++) begin : g_acs
    localparam logic [STATE_W-1:0] PRED_U = {1'b0, (STATE_W-1)'(j >> 1)};
    localparam logic [STATE_W-1:0] PRED_L = {1'b1, (STATE_W-1)'(j >> 1)};
    localparam logic [1:0]         CODE_U = branch_code(PRED_U, 1'(j));
    localparam logic [1:0]         CODE_L = branch_code(PRED_L, 1'(j));

    acs_unit u_acs (
      .bm_u (bm[CODE_U]),
      .sm_u (sm[PRED_U]),
      .bm_l (bm[CODE_L]),
      .sm_l (sm[PRED_L]),
      .nsm  (nsm[j]),
      .ps   (ps[j])
    );
  end

endmodule
