// Saturated adder of the ACS unit.
//
// Adds an unsigned A_W-bit branch metric A to an unsigned S_W-bit state metric B and
// clamps the result at the all-ones value instead of wrapping. The adder core is a
// radix-2 Kogge-Stone parallel-prefix adder (log2(S_W) prefix levels, A zero-extended,
// carry-in 0). Its carry out drives the saturation stage: a final carry forces every sum
// bit s high and every complement bit sn low. Both rails are brought out because the
// following compare and select logic is dual-rail; sn is always the bitwise inverse of s.
//
// Timing: combinational.
// The structure (Kogge-Stone core, carry-driven saturation, true and complement outputs)
// follows the published circuit; the prefix-tree form and the zero carry-in are this
// design's choices.
module sat_adder #(
  parameter int unsigned A_W = 5,
  parameter int unsigned S_W = 8
) (
  input  logic [A_W-1:0] a,
  input  logic [S_W-1:0] b,
  output logic [S_W-1:0] s,
  output logic [S_W-1:0] sn
);

  localparam int unsigned LEVELS = $clog2(S_W);

  logic [S_W-1:0] a_ext;
  logic [S_W-1:0] p0;                 // bit propagate (kept for the sum)
  logic [S_W-1:0] g   [LEVELS+1];     // group generate after each prefix level
  logic [S_W-1:0] p   [LEVELS+1];     // group propagate after each prefix level
  logic [S_W-1:0] raw;                // unsaturated sum
  logic           c_out;              // final carry (c8 for S_W = 8)

  assign a_ext = S_W'(a);
  assign p0    = a_ext ^ b;

  always_comb begin
    g[0] = a_ext & b;
    p[0] = p0;
    for (int l = 0; l < LEVELS; l++) begin
      for (int i = 0; i < S_W; i++) begin
        if (i >= (1 << l)) begin
          g[l+1][i] = g[l][i] | (p[l][i] & g[l][i-(1<<l)]);
          p[l+1][i] = p[l][i] & p[l][i-(1<<l)];
        end else begin
          g[l+1][i] = g[l][i];
          p[l+1][i] = p[l][i];
        end
      end
    end
  end

  // Carry into bit i is the group generate of bits i-1..0; carry-in is 0.
  assign raw   = p0 ^ {g[LEVELS][S_W-2:0], 1'b0};
  assign c_out = g[LEVELS][S_W-1];

  // Saturation stage: s_i = NAND(~raw_i, ~c), sn_i = NOR(~raw_i, c).
  assign s  = raw | {S_W{c_out}};
  assign sn = ~raw & {S_W{~c_out}};

endmodule
