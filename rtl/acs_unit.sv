// Add-compare-select (ACS) unit.
//
// One trellis state's update. The upper and lower candidate metrics are formed by two
// saturated adders, SU = SMu + BMu and SL = SMl + BMl, each clamped at 255. The
// comparator sets PS = 1 when SU > SL, and the selector passes the smaller candidate
// (SU on a tie) to NSM. PS is also the decision bit handed to the path memory.
// The comparator reads SL from the complement rail of the lower adder, as in a
// dual-rail implementation. The upper adder's complement rail has no reader here, since
// the selector is written single-rail, and is left open.
//
// Timing: combinational; NSM is registered by the pipeline register outside.
// The composition of two saturated adders, comparator and selector follows the
// published ACS block diagram.
module acs_unit
  import viterbi_pkg::*;
(
  input  bm_t  bm_u,
  input  sm_t  sm_u,
  input  bm_t  bm_l,
  input  sm_t  sm_l,
  output sm_t  nsm,
  output logic ps
);

  sm_t su, sl, sl_n;

  sat_adder #(.A_W(BM_W), .S_W(SM_W)) u_add_u (.a(bm_u), .b(sm_u), .s(su), .sn());
  sat_adder #(.A_W(BM_W), .S_W(SM_W)) u_add_l (.a(bm_l), .b(sm_l), .s(sl), .sn(sl_n));

  acs_comparator #(.W(SM_W)) u_cmp (.su(su), .sln(sl_n), .ps(ps));

  acs_selector #(.W(SM_W)) u_sel (.su(su), .sl(sl), .ps(ps), .nsm(nsm));

endmodule
