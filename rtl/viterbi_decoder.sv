// 16-state, rate-1/2, K = 5 state-parallel Viterbi decoder.
//
// Data path, one trellis step per clock:
//   r0/r1 --> bmc --(BM0..BM3)--> acs_array --(NSM 16x8)--> pipeline_register --(SM)--+
//                                     ^                                              |
//                                     +----------------------------------------------+
//                                 acs_array --(PS 16)--> path_memory --> decoded
// The branch metric calculator and the 16 ACS units are combinational; the state-metric
// register and the path memory load on the rising clock edge. The clock period is bounded
// by the loop register -> ACS -> register, which is why the ACS delay sets the data rate.
//
// Interface: r0/r1 must be held stable for one clock period per received symbol (one
// symbol per clock, no valid signal). rb is the active-low asynchronous reset that starts
// a frame in encoder state 0. `decoded` is the decision for the symbol applied DEPTH
// clocks earlier: a symbol present before rising edge n is decided on `decoded` after
// edge n + DEPTH - 1. ps and sm are brought out for observation.
// Metrics are not normalised: adders saturate at 255, so long noisy frames are split by
// reset. Block structure and widths follow the published decoder; code generators,
// trellis labelling, path-memory organisation and DEPTH are this design's choices.
module viterbi_decoder
  import viterbi_pkg::*;
#(
  parameter int unsigned DEPTH = 25
) (
  input  logic                clk,
  input  logic                rb,
  input  soft_t               r0,
  input  soft_t               r1,
  output logic                decoded,
  output logic [N_STATES-1:0] ps,
  output sm_t                 sm [N_STATES]
);

  bm_t bm  [N_BM];
  sm_t nsm [N_STATES];

  bmc u_bmc (.r0(r0), .r1(r1), .bm(bm));

  acs_array u_acs (.bm(bm), .sm(sm), .nsm(nsm), .ps(ps));

  pipeline_register u_reg (.clk(clk), .rb(rb), .nsm(nsm), .sm(sm));

  path_memory #(.DEPTH(DEPTH)) u_pm (.clk(clk), .rb(rb), .ps(ps), .decoded(decoded));

endmodule
