// Self-checking test of acs_unit: random and corner operands; NSM must be the smaller of
// the two saturated candidates (upper on a tie) and PS must name the lower one when it wins.
module tb_acs_unit;
  int checks = 0, failures = 0;
  logic [4:0] bm_u, bm_l;
  logic [7:0] sm_u, sm_l, nsm;
  logic ps;
  int unsigned cu, cl;
  int n_ps1 = 0, n_tie = 0, n_sat = 0;

  acs_unit dut (.bm_u(bm_u), .sm_u(sm_u), .bm_l(bm_l), .sm_l(sm_l), .nsm(nsm), .ps(ps));

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 20000; n++) begin
      bm_u = 5'($urandom); bm_l = 5'($urandom);
      // Bias half of the metrics near the top to exercise saturation.
      sm_u = (n % 4 == 0) ? 8'(230 + $urandom_range(25)) : 8'($urandom);
      sm_l = (n % 3 == 0) ? 8'(230 + $urandom_range(25)) : 8'($urandom);
      if (n % 7 == 0) begin sm_l = sm_u; bm_l = bm_u; end
      #1;
      cu = sm_u + bm_u; if (cu > 255) cu = 255;
      cl = sm_l + bm_l; if (cl > 255) cl = 255;
      if (cu == cl) n_tie++;
      if (cu == 255 || cl == 255) n_sat++;
      if (cu > cl) n_ps1++;
      checks++;
      if (ps !== (cu > cl) || nsm != 8'((cu > cl) ? cl : cu)) begin
        failures++;
        if (failures < 10) $display("FAIL u=%0d+%0d l=%0d+%0d nsm=%0d ps=%0b", sm_u, bm_u, sm_l, bm_l, nsm, ps);
      end
    end
    checks += 3;
    if (n_ps1 == 0 || n_tie == 0 || n_sat == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
