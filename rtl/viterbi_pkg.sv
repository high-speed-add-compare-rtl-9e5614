// Shared constants and types of the 16-state Viterbi decoder.
//
// The decoder works on a constraint-length K = 5, rate-1/2 convolutional code, so the
// trellis has 2^(K-1) = 16 states. Received symbols are two 4-bit soft values, branch
// metrics are 5 bits wide and state (path) metrics 8 bits wide; these numbers follow the
// published block diagram. The code generators are not part of that description: this
// design uses the maximum-free-distance K = 5 pair 23 and 35 (octal). Generator vectors
// are written with the current input bit as MSB and the oldest (delay 4) bit as LSB.
package viterbi_pkg;

  localparam int unsigned K        = 5;
  localparam int unsigned N_STATES = 1 << (K - 1);   // 16
  localparam int unsigned STATE_W  = K - 1;          // 4
  localparam int unsigned R_W      = 4;              // soft input width
  localparam int unsigned BM_W     = 5;              // branch metric width
  localparam int unsigned SM_W     = 8;              // state metric width
  localparam int unsigned N_BM     = 4;              // one metric per code-bit pair

  localparam logic [K-1:0] G0 = 5'b10011;            // octal 23
  localparam logic [K-1:0] G1 = 5'b11101;            // octal 35

  typedef logic [R_W-1:0]  soft_t;
  typedef logic [BM_W-1:0] bm_t;
  typedef logic [SM_W-1:0] sm_t;

  // Encoder output pair {c0, c1} for input bit u entering state s, where s holds the
  // previous four inputs with the newest in bit 0. Window bit order: u, s[0], .., s[3].
  function automatic logic [1:0] branch_code(input logic [STATE_W-1:0] s, input logic u);
    logic [K-1:0] w;
    w = {u, s[0], s[1], s[2], s[3]};
    return {^(w & G0), ^(w & G1)};
  endfunction

endpackage
