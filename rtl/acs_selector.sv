// Selector of the ACS unit.
//
// Forwards the surviving candidate as the new state metric: SU when PS = 0, SL when
// PS = 1. The published circuit uses CMOS transmission gates; here it is a 2:1
// multiplexer with the same function.
//
// Timing: combinational.
module acs_selector #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] su,
  input  logic [W-1:0] sl,
  input  logic         ps,
  output logic [W-1:0] nsm
);

  always_comb nsm = ps ? sl : su;

endmodule
