// Self-checking test of sat_adder: all 32 x 256 operand pairs against min(a + b, 255)
// and the complement rail against the inverse of the sum.
module tb_sat_adder;
  int checks = 0, failures = 0;
  logic [4:0] a;
  logic [7:0] b, s, sn;
  int unsigned expect_s;
  int saturated = 0;

  sat_adder #(.A_W(5), .S_W(8)) dut (.a(a), .b(b), .s(s), .sn(sn));

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) begin
      for (int j = 0; j < 256; j++) begin
        a = 5'(i); b = 8'(j);
        #1;
        expect_s = (i + j > 255) ? 255 : i + j;
        if (i + j > 255) saturated++;
        checks++;
        if (s != 8'(expect_s) || sn != ~8'(expect_s)) begin
          failures++;
          if (failures < 10) $display("FAIL a=%0d b=%0d s=%0d sn=%0h", a, b, s, sn);
        end
      end
    end
    checks++;
    if (saturated == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
