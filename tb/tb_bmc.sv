// Self-checking test of bmc: every pair of 4-bit soft inputs; BMk must equal the
// distance of (R0, R1) to the ideal pair (15*c0, 15*c1) with k = 2*c0 + c1.
module tb_bmc;
  import viterbi_pkg::*;
  int checks = 0, failures = 0;
  soft_t r0, r1;
  bm_t bm [N_BM];
  int e;

  bmc dut (.r0(r0), .r1(r1), .bm(bm));

  initial begin : watchdog
    #100_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      for (int j = 0; j < 16; j++) begin
        r0 = 4'(i); r1 = 4'(j);
        #1;
        for (int c0 = 0; c0 < 2; c0++) begin
          for (int c1 = 0; c1 < 2; c1++) begin
            e = (c0 ? 15 - i : i) + (c1 ? 15 - j : j);
            checks++;
            if (int'(bm[2*c0 + c1]) != e) begin
              failures++;
              if (failures < 10) $display("FAIL r=%0d,%0d k=%0d bm=%0d exp=%0d", i, j, 2*c0+c1, bm[2*c0+c1], e);
            end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
