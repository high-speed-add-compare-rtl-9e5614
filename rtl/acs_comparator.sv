// Comparator of the ACS unit.
//
// Decides which of the two candidate path metrics survives. It is an adder that keeps
// only its final carry: SU is added to the complement of SL (carry-in 0), and
//     SU + ~SL >= 2^W  exactly when  SU > SL.
// So the path-select output PS is 0 when SU <= SL (the upper path wins, also on a tie)
// and 1 when SU > SL. The carry is formed by a Kogge-Stone group generate/propagate tree
// pruned to the one prefix that ends at the top bit. The complement of SL is taken
// from the complement rail of the lower saturated adder, so the port is SLn = ~SL.
//
// Timing: combinational.
// The carry-of-SU-plus-not-SL formulation and the PS convention follow the published
// comparator; the pruned prefix tree is this design's choice.
module acs_comparator #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] su,
  input  logic [W-1:0] sln,   // complement of SL
  output logic         ps
);

  localparam int unsigned LEVELS = $clog2(W);
  localparam int unsigned WP     = 1 << LEVELS;   // padded to a power of two

  logic [WP-1:0] g [LEVELS+1];
  logic [WP-1:0] p [LEVELS+1];

  // Reduce neighbouring groups pairwise: after level l, element i covers 2^(l+1) bits.
  always_comb begin
    g[0] = WP'(su & sln);
    p[0] = '1;                       // padding bits only pass the carry on
    p[0][W-1:0] = su ^ sln;
    for (int l = 1; l <= LEVELS; l++) begin
      g[l] = '0;
      p[l] = '0;
      for (int i = 0; i < (WP >> l); i++) begin
        g[l][i] = g[l-1][2*i+1] | (p[l-1][2*i+1] & g[l-1][2*i]);
        p[l][i] = p[l-1][2*i+1] & p[l-1][2*i];
      end
    end
  end

  assign ps = g[LEVELS][0];

endmodule
