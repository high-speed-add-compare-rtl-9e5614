// Survivor path memory (register exchange).
//
// Every state j keeps a DEPTH-bit register with the input bits of its surviving path,
// newest in bit 0. On each rising clock edge state j takes the register of the
// predecessor its ACS unit chose, {PS[j], j[3:1]}, shifts it up by one and appends its
// own input bit j[0]. After DEPTH steps all survivors have almost always merged, so the
// oldest bit of any register is the decision; this design reads state 0's.
// All registers are built from reset flip-flops and clear to 0 when RB = 0.
//
// Timing: the decision for the trellis step whose PS vector was applied at clock edge n
// appears on `decoded` after edge n + DEPTH - 1, i.e. DEPTH - 1 cycles later.
// That the path memory is clocked, takes the 16 decisions and is built of the reset
// flip-flops follows the published design; the register-exchange organisation, DEPTH and
// the output state are this design's choices.
module path_memory
  import viterbi_pkg::*;
#(
  parameter int unsigned DEPTH = 25
) (
  input  logic                clk,
  input  logic                rb,
  input  logic [N_STATES-1:0] ps,
  output logic                decoded
);

  logic [DEPTH-1:0] surv      [N_STATES];
  logic [DEPTH-1:0] surv_next [N_STATES];

  for (genvar j = 0; j < N_STATES; j++) begin : g_state
    localparam logic [STATE_W-2:0] PRED_LOW = (STATE_W-1)'(j >> 1);

    always_comb begin
      surv_next[j] = {surv[ps[j] ? {1'b1, PRED_LOW} : {1'b0, PRED_LOW}][DEPTH-2:0], 1'(j)};
    end

    dff_ar #(.W(DEPTH)) u_surv (.clk(clk), .rb(rb), .d(surv_next[j]), .q(surv[j]));
  end

  assign decoded = surv[0][DEPTH-1];

endmodule
