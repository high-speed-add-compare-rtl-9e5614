// Self-checking test of acs_array. A reference trellis step is computed here by
// enumerating every (state, input bit) branch of the K = 5 code with generators
// 1 + D^3 + D^4 (octal 23) and 1 + D + D^2 + D^4 (octal 35), keeping for each next state
// the smaller saturated candidate (the predecessor with a 0 in its oldest bit on a tie).
module tb_acs_array;
  import viterbi_pkg::*;
  int checks = 0, failures = 0;
  bm_t bm  [N_BM];
  sm_t sm  [N_STATES];
  sm_t nsm [N_STATES];
  logic [N_STATES-1:0] ps;

  int unsigned best [N_STATES];
  logic        best_ps [N_STATES];
  logic        seen [N_STATES];
  int n_ps1 = 0;

  acs_array dut (.bm(bm), .sm(sm), .nsm(nsm), .ps(ps));

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic reference();
    int unsigned cand;
    logic c0, c1;
    logic [3:0] nxt;
    for (int j = 0; j < N_STATES; j++) seen[j] = 0;
    for (int p = 0; p < N_STATES; p++) begin
      for (int u = 0; u < 2; u++) begin
        c0 = 1'(u) ^ p[2] ^ p[3];
        c1 = 1'(u) ^ p[0] ^ p[1] ^ p[3];
        nxt = {4'(p)} << 1 | 4'(u);
        cand = sm[p] + bm[{c0, c1}];
        if (cand > 255) cand = 255;
        if (!seen[nxt] || cand < best[nxt] || (cand == best[nxt] && p[3] == 0)) begin
          best[nxt] = cand; best_ps[nxt] = p[3]; seen[nxt] = 1;
        end
      end
    end
  endtask

  initial begin
    for (int n = 0; n < 5000; n++) begin
      for (int k = 0; k < N_BM; k++) bm[k] = (n % 5 == 0) ? bm_t'(0) : bm_t'($urandom_range(30));
      for (int j = 0; j < N_STATES; j++)
        sm[j] = (n % 3 == 0) ? sm_t'(200 + $urandom_range(55)) : sm_t'($urandom_range(120));
      #1;
      reference();
      for (int j = 0; j < N_STATES; j++) begin
        checks++;
        if (ps[j]) n_ps1++;
        if (nsm[j] != sm_t'(best[j]) || ps[j] !== best_ps[j]) begin
          failures++;
          if (failures < 10) $display("FAIL n=%0d j=%0d nsm=%0d exp=%0d ps=%0b exp=%0b", n, j, nsm[j], best[j], ps[j], best_ps[j]);
        end
      end
    end
    checks++;
    if (n_ps1 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
