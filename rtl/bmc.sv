// Branch metric calculator (BMC).
//
// Turns one received symbol, two 4-bit soft values R0 and R1, into the four branch
// metrics BM0..BM3, one for each code-bit pair {c0, c1} a trellis branch can carry
// (index k = 2*c0 + c1). A soft value of 0 stands for a confident '0' and 15 for a
// confident '1'; the metric of pair k is the Manhattan distance
//     BMk = |R0 - 15*c0| + |R1 - 15*c1|,
// which is 0..30 and fits the 5-bit branch metric bus. Smaller means more likely.
//
// Timing: purely combinational, as in the published timing diagram where BM follows the
// received data after the BMC delay within the same clock period.
// The port widths (4-bit inputs, 5-bit metrics) follow the published block diagram; the
// soft-value encoding and the distance measure are this design's choice.
module bmc
  import viterbi_pkg::*;
(
  input  soft_t r0,
  input  soft_t r1,
  output bm_t   bm [N_BM]
);

  localparam soft_t SOFT_MAX = '1;

  // Distance of one soft value to an ideal '0' or '1'.
  function automatic soft_t soft_dist(input soft_t r, input logic c);
    return c ? soft_t'(SOFT_MAX - r) : r;
  endfunction

  always_comb begin
    for (int k = 0; k < N_BM; k++) begin
      bm[k] = bm_t'(soft_dist(r0, k[1])) + bm_t'(soft_dist(r1, k[0]));
    end
  end

endmodule
