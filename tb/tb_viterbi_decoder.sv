// End-to-end test of viterbi_decoder at its default size.
//
// Random frames of information bits are convolutionally encoded here (K = 5, generators
// 1 + D^3 + D^4 and 1 + D + D^2 + D^4), mapped to 4-bit soft values (0 for a '0', 15 for
// a '1'), disturbed by small soft noise and by occasional hard bit flips spaced at least
// 12 symbols apart, and fed to the decoder one symbol per clock after a reset. Checks:
//  - the decoded bit after clock edge n equals the information bit sent DEPTH-1 edges
//    earlier (the path-memory latency), for every bit of every frame;
//  - the metric of the true encoder state never exceeds the accumulated branch metric of
//    the transmitted path (that path is always one candidate), clamped at 255;
//  - after reset state 0 starts at 0 and the others at 255.
// Mechanisms counted, each must occur: corrected channel flips, saturated metrics
// (255 reached through the adders), lower-path selections (PS = 1), frame restarts.
module tb_viterbi_decoder;
  import viterbi_pkg::*;
  localparam int DEPTH  = 25;          // the decoder's default survivor length
  localparam int FRAMES = 20;
  localparam int INFO   = 80;          // checked bits per frame
  localparam int LEN    = INFO + DEPTH; // symbols sent per frame, tail flushes the memory

  int checks = 0, failures = 0;
  logic clk = 0, rb = 0;
  soft_t r0, r1;
  logic decoded;
  logic [N_STATES-1:0] ps;
  sm_t sm [N_STATES];

  logic u [LEN];
  logic [3:0] enc_state, true_state [LEN];
  int unsigned path_cost;
  int last_flip;
  int n_flips = 0, n_sat = 0, n_ps1 = 0, n_frames = 0;

  viterbi_decoder dut (.clk(clk), .rb(rb), .r0(r0), .r1(r1), .decoded(decoded), .ps(ps), .sm(sm));

  always #5 clk = ~clk;

  initial begin : watchdog
    #(FRAMES * (LEN + 4) * 10 + 1000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic soft_t noisy(input logic c);
    int v;
    v = c ? 15 : 0;
    if ($urandom_range(3) == 0) v = c ? v - int'($urandom_range(3)) : v + int'($urandom_range(3));
    return soft_t'(v);
  endfunction

  initial begin
    r0 = '0; r1 = '0;
    for (int f = 0; f < FRAMES; f++) begin
      // Frame start: asynchronous reset between clock edges.
      @(negedge clk); rb = 0; #1;
      checks++;
      if (sm[0] != 0) failures++;
      for (int j = 1; j < N_STATES; j++) begin
        checks++;
        if (sm[j] != 255) failures++;
      end
      @(negedge clk); rb = 1;
      n_frames++;
      enc_state = '0; path_cost = 0; last_flip = -100;
      for (int t = 0; t < LEN; t++) u[t] = 1'($urandom);
      for (int t = 0; t < LEN; t++) begin
        logic c0, c1, flip;
        soft_t v0, v1;
        c0 = u[t] ^ enc_state[2] ^ enc_state[3];
        c1 = u[t] ^ enc_state[0] ^ enc_state[1] ^ enc_state[3];
        v0 = noisy(c0); v1 = noisy(c1);
        flip = (t - last_flip >= 12) && ($urandom_range(5) == 0);
        if (flip) begin
          last_flip = t; n_flips++;
          if ($urandom_range(1) == 0) v0 = ~v0; else v1 = ~v1;
        end
        r0 = v0; r1 = v1;
        path_cost += (c0 ? 15 - int'(v0) : int'(v0)) + (c1 ? 15 - int'(v1) : int'(v1));
        enc_state = {enc_state[2:0], u[t]};
        true_state[t] = enc_state;
        @(posedge clk); #1;
        n_ps1 += $countones(ps);
        // Survivor metric of the true state is at most the transmitted path's cost.
        checks++;
        if (int'(sm[enc_state]) > ((path_cost > 255) ? 255 : path_cost)) begin
          failures++;
          $display("FAIL frame %0d t=%0d true-state metric %0d > path cost %0d", f, t, sm[enc_state], path_cost);
        end
        if (t >= 4) for (int j = 0; j < N_STATES; j++) if (sm[j] == 255) begin n_sat++; break; end
        // Path-memory latency: the bit sent DEPTH-1 edges ago is on the output now.
        if (t >= DEPTH - 1 && t - (DEPTH - 1) < INFO) begin
          checks++;
          if (decoded !== u[t - (DEPTH - 1)]) begin
            failures++;
            if (failures < 20) $display("FAIL frame %0d bit %0d decoded=%0b sent=%0b", f, t - DEPTH + 1, decoded, u[t - DEPTH + 1]);
          end
        end
        @(negedge clk);
      end
    end
    $display("mechanisms: frames=%0d corrected_flips=%0d saturated_cycles=%0d lower_path_selections=%0d",
             n_frames, n_flips, n_sat, n_ps1);
    checks += 4;
    if (n_frames == 0) failures++;
    if (n_flips == 0) failures++;
    if (n_sat == 0) failures++;
    if (n_ps1 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
